// tb_inc_dec_counter -- checks the stack-pointer counter: counts up with
// ctrl = 0, down with ctrl = 1, only while set is high, wraps at 8 bits and
// clears on reset. Random stimulus, model comparison every cycle, plus a
// directed wrap from 0 down to 0xFF.
module tb_inc_dec_counter;
  logic clk = 0, rst, set, ctrl;
  logic [7:0] out, m;
  int checks = 0, failures = 0;

  inc_dec_counter #(.W(8)) dut (.clk(clk), .rst(rst), .set(set), .ctrl(ctrl), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] exp);
    checks++;
    if (out !== exp) begin failures++; $display("FAIL out=%h exp %h", out, exp); end
  endtask

  initial begin
    rst = 1; set = 0; ctrl = 0;
    @(negedge clk);
    rst = 0; set = 1; ctrl = 1;
    @(negedge clk);
    chk(8'hFF);   // 0 - 1 wraps
    ctrl = 0;
    @(negedge clk);
    chk(8'h00);
    m = 0;
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 63) == 0);
      set = $urandom_range(0, 1);
      ctrl = $urandom_range(0, 1);
      @(negedge clk);
      if (rst) m = 0; else if (set) m = ctrl ? m - 8'd1 : m + 8'd1;
      chk(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
