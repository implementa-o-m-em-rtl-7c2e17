// tb_reg_bank -- checks the B..E register bank: random select, load and
// reset; the selected register's output is compared with a model of all
// four registers, and loads must only touch the selected register.
module tb_reg_bank;
  logic clk = 0, rst, load;
  logic [1:0] sel;
  logic [7:0] in, out;
  logic [7:0] m [4];
  int checks = 0, failures = 0;

  reg_bank #(.NREGS(4)) dut (.clk(clk), .rst(rst), .sel(sel), .load(load), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; sel = 0; in = 0;
    @(negedge clk);
    for (int i = 0; i < 4; i++) m[i] = 0;
    for (int i = 0; i < 1500; i++) begin
      rst = ($urandom_range(0, 63) == 0);
      load = $urandom_range(0, 1);
      sel = 2'($urandom);
      in = 8'($urandom);
      @(negedge clk);
      if (rst) for (int k = 0; k < 4; k++) m[k] = 0;
      else if (load) m[sel] = in;
      sel = 2'($urandom);
      #1;
      checks++;
      if (out !== m[sel]) begin failures++; $display("FAIL r%0d=%h exp %h", sel, out, m[sel]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
