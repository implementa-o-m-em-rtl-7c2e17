// tb_ram_decode -- checks all 16 entries of the instruction decoder ROM
// against the published table of microroutine start addresses.
module tb_ram_decode;
  logic [3:0] addr;
  logic [7:0] data;
  logic [7:0] table_exp [16] = '{8'h03, 8'h08, 8'h0D, 8'h14, 8'h19, 8'h1E, 8'h25, 8'h2A,
                                 8'h2C, 8'h31, 8'h36, 8'h3D, 8'h46, 8'h50, 8'h59, 8'h6C};
  int checks = 0, failures = 0;

  ram_decode dut (.addr(addr), .data(data));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (data !== table_exp[i]) begin failures++; $display("FAIL [%0d]=%h exp %h", i, data, table_exp[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
