// tb_accumulator -- checks the accumulator: random load / reset / data,
// both outputs compared with a model after every rising edge.
module tb_accumulator;
  logic clk = 0, rst, load;
  logic [7:0] in, out, buffer, m;
  int checks = 0, failures = 0;

  accumulator #(.W(8)) dut (.clk(clk), .rst(rst), .load(load), .in(in), .out(out), .buffer(buffer));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; in = 0;
    @(negedge clk);
    m = 0;
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 15) == 0);
      load = $urandom_range(0, 1);
      in = 8'($urandom);
      @(negedge clk);
      if (rst) m = 0; else if (load) m = in;
      checks++;
      if (out !== m || buffer !== m) begin
        failures++; $display("FAIL out=%h buffer=%h exp %h", out, buffer, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
