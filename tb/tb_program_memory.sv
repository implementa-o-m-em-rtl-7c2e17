// tb_program_memory -- checks the program memory: bytes written through the
// load port read back at the same address while cs_n is low, and read as 0
// while cs_n is high. Random addresses over the whole 64 K space.
module tb_program_memory;
  logic clk = 0, cs_n, we;
  logic [15:0] addr, waddr;
  logic [7:0] rdata, wdata;
  logic [15:0] a_log [300];
  logic [7:0]  d_log [300];
  int checks = 0, failures = 0;

  program_memory #(.AW(16)) dut (
    .clk(clk), .cs_n(cs_n), .addr(addr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_n = 1; we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 300; i++) begin
      a_log[i] = 16'(i * 211 + 16'($urandom_range(0, 200)));
      // keep addresses distinct
      a_log[i] = {a_log[i][15:9], 9'(i)};
      d_log[i] = 8'($urandom);
      we = 1; waddr = a_log[i]; wdata = d_log[i];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 300; i++) begin
      cs_n = 0; addr = a_log[i];
      #1;
      checks++;
      if (rdata !== d_log[i]) begin failures++; $display("FAIL [%h]=%h exp %h", addr, rdata, d_log[i]); end
      cs_n = 1;
      #1;
      checks++;
      if (rdata !== 8'h00) begin failures++; $display("FAIL deselected read %h", rdata); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
