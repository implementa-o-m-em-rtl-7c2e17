// tb_buffer_reg -- checks buffer_reg against a register model: random load,
// reset and data for 500 cycles, comparing q after every rising edge.
module tb_buffer_reg;
  logic clk = 0, rst, load;
  logic [7:0] d, q, m;
  int checks = 0, failures = 0;

  buffer_reg #(.W(8)) dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = 0;
    @(negedge clk);
    m = 0;
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 15) == 0);
      load = $urandom_range(0, 1);
      d = 8'($urandom);
      @(negedge clk);
      if (rst) m = 0; else if (load) m = d;
      checks++;
      if (q !== m) begin failures++; $display("FAIL q=%h exp %h", q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
