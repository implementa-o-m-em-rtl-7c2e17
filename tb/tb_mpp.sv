// tb_mpp -- runs the M++ core with a program ROM modelled in the testbench
// (selected by ~out_signals[1], as in the published stimulus block). The
// program is the published demonstration loop: MOV 55,A; MOV 66,B; ADD B,A;
// MOV A,B; MOV A,OUT1; CALL MOVE; JMP Loop; MOVE: RET. Checks: the output
// port shows 0xBB, written in cycle 22 after reset and then every 55 cycles
// (the loop's length under the microprogram), B holds 0xBB, the call frame
// sits at RAM 0xFC..0xFF, SP returns to 0 after every loop, and IN reads
// the input port.
module tb_mpp;
  logic clk = 0, rst;
  logic [7:0] instruction, in, out;
  logic [4:0] out_signals;
  logic [15:0] program_addr;
  logic [7:0] rom [32];
  int checks = 0, failures = 0;

  mpp dut (
    .clk(clk), .rst(rst), .instruction(instruction), .out_signals(out_signals),
    .program_addr(program_addr), .in(in), .out(out)
  );

  always #5 clk = ~clk;

  always_comb instruction = (~out_signals[1]) ? 8'h00 : rom[program_addr[4:0]];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at t=%0t", what, $time); end
  endtask

  initial begin
    int cyc;
    int writes [$];
    logic [7:0] p [19] = '{8'h07, 8'hC0, 8'h55, 8'h07, 8'hC1, 8'h66, 8'h02, 8'h00, 8'h0E,
                           8'h07, 8'h06, 8'h00, 8'h11, 8'h07, 8'h03, 8'h00, 8'h00, 8'h04, 8'h03};
    for (int i = 0; i < 32; i++) rom[i] = 8'h00;
    for (int i = 0; i < 19; i++) rom[i] = p[i];
    rst = 1; in = 8'h14;
    repeat (2) @(negedge clk);
    rst = 0;
    cyc = 0;
    while (cyc < 200) begin
      cyc++;
      if (out_signals[3]) writes.push_back(cyc);
      // SP is back at 0 at the start of each loop iteration
      if (program_addr == 16'h0000 && dut.cm.ic == 8'h00 && cyc > 1) chk(dut.ra.sp == 8'h00, "SP balanced");
      @(negedge clk);
    end
    chk(writes.size() == 4, "output written once per loop");
    if (writes.size() >= 3) begin
      chk(writes[0] == 22, "first OUT in cycle 22");
      chk(writes[1] - writes[0] == 55 && writes[2] - writes[1] == 55, "loop period 55 cycles");
    end
    chk(out == 8'hBB, "output 55+66 = BB");
    chk(dut.rb.regs[0] == 8'hBB, "B = BB");
    chk(dut.rs.mem[8'hFC] == 8'h0D && dut.rs.mem[8'hFD] == 8'h00 &&
        dut.rs.mem[8'hFE] == 8'h11 && dut.rs.mem[8'hFF] == 8'h00, "call frame at FC..FF");
    // IN: execute a lone IN instruction placed at 0x12 by jumping there
    rst = 1;
    rom[0] = 8'h07; rom[1] = 8'h03; rom[2] = 8'h00; rom[3] = 8'h12;
    rom[18] = 8'h03; rom[19] = 8'h06; rom[20] = 8'h07; rom[21] = 8'h03; rom[22] = 8'h00; rom[23] = 8'h14;
    @(negedge clk);
    rst = 0;
    in = 8'h3C;
    repeat (30) @(negedge clk);
    chk(dut.acc.a == 8'h3C && out == 8'h3C, "IN then OUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
