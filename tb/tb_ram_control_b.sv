// tb_ram_control_b -- checks control memory B: selected micro-instructions
// against hand-assembled words (bit 0 SelSP, 1 ULAbus, 2 BUFcar, 3 ACbus,
// 4 ACcar, 5 REGbus, 6 REGcar, 7 RAMrd, 8 RAMwr, 9 RAMcs, 10 INbus,
// 11 OUTcar), that no word enables two bus sources, and that RAMrd / RAMwr
// only appear together with RAMcs.
module tb_ram_control_b;
  logic [7:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  ram_control_b #(.DEPTH(256)) dut (.addr(addr), .data(data));

  logic [7:0]  chk_addr [16] = '{8'h00, 8'h03, 8'h0D, 8'h0E, 8'h14, 8'h19, 8'h25, 8'h2C,
                                 8'h32, 8'h37, 8'h3E, 8'h4A, 8'h5E, 8'h6D, 8'h80, 8'h1E};
  logic [15:0] chk_word [16] = '{16'h0000, 16'h0048, 16'h0024, 16'h0012, 16'h0410, 16'h0281,
                                 16'h0808, 16'h0004, 16'h0042, 16'h0308, 16'h0301, 16'h0281,
                                 16'h0301, 16'h0290, 16'h0000, 16'h000C};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int i = 0; i < 16; i++) begin
      addr = chk_addr[i];
      #1;
      checks++;
      if (data !== chk_word[i]) begin
        failures++; $display("FAIL B[%h]=%h exp %h", addr, data, chk_word[i]);
      end
    end
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      n = int'(data[1]) + int'(data[3]) + int'(data[5]) + int'(data[10]) + int'(data[7] & data[9]);
      checks++;
      if (n > 1) begin failures++; $display("FAIL B[%h] has %0d bus sources", addr, n); end
      checks++;
      if ((data[7] | data[8]) && !data[9]) begin failures++; $display("FAIL B[%h] RAM access without RAMcs", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
