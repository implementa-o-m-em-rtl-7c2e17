// tb_program_addresser -- checks the 16-bit PC: increment across the byte
// boundary with both strobes and sel_data = 0, byte loads of either half
// from the bus with sel_data = 1, hold when no strobe, reset. Random
// stimulus against a model plus a directed 0x00FF -> 0x0100 carry.
module tb_program_addresser;
  logic clk = 0, rst, sel_data, pcl_car, pch_car;
  logic [7:0] in, lo, hi;
  logic [15:0] m, inc;
  int checks = 0, failures = 0;

  program_addresser #(.AW(16)) dut (
    .clk(clk), .rst(rst), .sel_data(sel_data), .pcl_car(pcl_car), .pch_car(pch_car),
    .in(in), .out_low(lo), .out_high(hi)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] exp);
    checks++;
    if ({hi, lo} !== exp) begin failures++; $display("FAIL pc=%h exp %h", {hi, lo}, exp); end
  endtask

  initial begin
    rst = 1; sel_data = 0; pcl_car = 0; pch_car = 0; in = 0;
    @(negedge clk);
    rst = 0;
    chk(16'h0000);
    sel_data = 1; pcl_car = 1; in = 8'hFF;
    @(negedge clk);
    chk(16'h00FF);
    sel_data = 0; pcl_car = 1; pch_car = 1;
    @(negedge clk);
    chk(16'h0100);
    m = 16'h0100;
    for (int i = 0; i < 2000; i++) begin
      rst = ($urandom_range(0, 127) == 0);
      sel_data = $urandom_range(0, 1);
      pcl_car = $urandom_range(0, 1);
      pch_car = $urandom_range(0, 1);
      in = 8'($urandom);
      @(negedge clk);
      inc = m + 16'd1;
      if (rst) m = 0;
      else begin
        if (pcl_car) m[7:0]  = sel_data ? in : inc[7:0];
        if (pch_car) m[15:8] = sel_data ? in : inc[15:8];
      end
      chk(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
