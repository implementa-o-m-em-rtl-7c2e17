// tb_alu -- checks the ALU: all eight operations with random and corner
// operands against an independent model, and the Z / C flip-flops, which
// must change only on a clock edge with en high.
module tb_alu;
  logic clk = 0, rst, en;
  logic [2:0] sel;
  logic [7:0] a, b, out;
  logic fc, fz, m_c, m_z;
  int checks = 0, failures = 0;

  alu #(.W(8)) dut (.clk(clk), .rst(rst), .sel(sel), .en(en), .in_a(a), .in_b(b),
                    .out(out), .flag_c(fc), .flag_z(fz));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [8:0] model(input logic [2:0] op, input logic [7:0] x, input logic [7:0] y);
    case (op)
      3'd0: return 9'(x) + 9'(y);
      3'd1: return {x < y, 8'(x - y)};
      3'd2: return {1'b0, x & y};
      3'd3: return {1'b0, x | y};
      3'd4: return {1'b0, x ^ y};
      3'd5: return {1'b0, ~y};
      3'd6: return {1'b0, y};
      default: return 9'(y) + 9'd1;
    endcase
  endfunction

  initial begin
    logic [8:0] r;
    logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    rst = 1; en = 0; sel = 0; a = 0; b = 0;
    @(negedge clk);
    rst = 0;
    m_c = 0; m_z = 0;
    for (int i = 0; i < 4000; i++) begin
      sel = 3'(i % 8);
      if (i < 288) begin a = corner[(i / 8) % 6]; b = corner[(i / 48) % 6]; end
      else begin a = 8'($urandom); b = 8'($urandom); end
      en = $urandom_range(0, 1);
      #1;
      r = model(sel, a, b);
      checks++;
      if (out !== r[7:0]) begin failures++; $display("FAIL op%0d %h,%h -> %h exp %h", sel, a, b, out, r[7:0]); end
      @(negedge clk);
      if (en) begin m_c = r[8]; m_z = (r[7:0] == 0); end
      checks++;
      if (fc !== m_c || fz !== m_z) begin failures++; $display("FAIL flags c%b z%b exp c%b z%b", fc, fz, m_c, m_z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
