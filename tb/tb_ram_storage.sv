// tb_ram_storage -- checks the 256 x 8 data RAM: fills it, then random
// writes (only with cs and we both high) and combinational reads against a
// model array.
module tb_ram_storage;
  logic clk = 0, cs, we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] m [256];
  int checks = 0, failures = 0;

  ram_storage #(.DEPTH(256)) dut (.clk(clk), .cs(cs), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs = 1; we = 1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); wdata = 8'(i * 7 + 3); m[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      cs = $urandom_range(0, 1);
      we = $urandom_range(0, 1);
      addr = 8'($urandom);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== m[addr]) begin failures++; $display("FAIL [%h]=%h exp %h", addr, rdata, m[addr]); end
      @(negedge clk);
      if (cs && we) m[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
