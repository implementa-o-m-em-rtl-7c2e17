// tb_ram_control_a -- checks control memory A: selected micro-instructions
// against hand-assembled words (bit 0 ICres, 1 ICresZ, 2 ICresC, 3 RIcar,
// 4 SelRI, 5 High Decoder, 6 ROMrd, 7 ROMcs, 8 PCHbus, 9 PCLbus, 10 PCHcar,
// 11 PCLcar, 12 SeldataPC, 13 DIRcar, 14 SPcar, 15 SPinc/dec), and that
// every routine reached from the decoder table ends with ICres before the
// next routine's start address.
module tb_ram_control_a;
  logic [7:0]  addr;
  logic [15:0] data;
  int checks = 0, failures = 0;

  ram_control_a #(.DEPTH(256)) dut (.addr(addr), .data(data));

  logic [7:0]  chk_addr [18] = '{8'h00, 8'h01, 8'h03, 8'h0D, 8'h0E, 8'h14, 8'h19, 8'h25, 8'h2B,
                                 8'h37, 8'h3E, 8'h4A, 8'h55, 8'h5E, 8'h67, 8'h6D, 8'h80, 8'h36};
  logic [15:0] chk_word [18] = '{16'h0CC8, 16'h0010, 16'h0001, 16'h0000, 16'h0001, 16'h0001,
                                 16'h5800, 16'h0001, 16'h0030, 16'h0001, 16'h0CC0, 16'h5802,
                                 16'h5405, 16'h0100, 16'hC001, 16'h0001, 16'h0001, 16'h2CC0};
  logic [7:0]  starts [17] = '{8'h03, 8'h08, 8'h0D, 8'h14, 8'h19, 8'h1E, 8'h25, 8'h2A,
                               8'h2C, 8'h31, 8'h36, 8'h3D, 8'h46, 8'h50, 8'h59, 8'h6C, 8'h80};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    bit ended;
    for (int i = 0; i < 18; i++) begin
      addr = chk_addr[i];
      #1;
      checks++;
      if (data !== chk_word[i]) begin
        failures++; $display("FAIL A[%h]=%h exp %h", addr, data, chk_word[i]);
      end
    end
    // every routine except the prefix ends with ICres inside its slot
    for (int r = 0; r < 16; r++) begin
      if (r == 7) continue;
      ended = 0;
      for (a = starts[r]; a < starts[r + 1]; a++) begin
        addr = 8'(a);
        #1;
        if (data[0]) begin ended = 1; break; end
      end
      checks++;
      if (!ended) begin failures++; $display("FAIL routine at %h has no ICres", starts[r]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
