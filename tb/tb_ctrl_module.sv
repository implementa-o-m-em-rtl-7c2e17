// tb_ctrl_module -- checks the control unit's sequencing: the IC trace of an
// ALU-register instruction (0, 1, 0D, 0E, 0) and of a prefixed JZ (0, 1,
// 2A, 2B, 46..4B, 0), the RI fields reg_sel / alu_sel, eoi in the last
// cycle, and that PCLcar / PCHcar in the JZ / JC words pass only when the
// tested flag is 1 while unconditional PC loads always pass.
module tb_ctrl_module;
  import mpp_pkg::*;
  logic clk = 0, rst, flag_z, flag_c;
  logic [7:0] instruction, ic;
  ctrl_a_t ca;
  ctrl_b_t cb;
  logic [1:0] reg_sel;
  logic [2:0] alu_sel;
  logic eoi;
  int checks = 0, failures = 0;

  ctrl_module dut (
    .clk(clk), .rst(rst), .instruction(instruction), .flag_z(flag_z), .flag_c(flag_c),
    .ctrl_a(ca), .ctrl_b(cb), .reg_sel(reg_sel), .alu_sel(alu_sel), .eoi(eoi), .ic(ic)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ic=%h)", what, ic); end
  endtask

  // Runs one instruction whose bytes are b[], returning the IC trace.
  logic [7:0] bytes [4];
  logic [7:0] trace [16];
  int tlen;

  task automatic run_instr(input int nbytes);
    int p;
    p = 0;
    tlen = 0;
    do begin
      instruction = (p < nbytes) ? bytes[p] : 8'h00;
      #1;
      trace[tlen] = ic;
      tlen++;
      if (ca.ic_res_z) chk(ca.pcl_car == flag_z || ca.pch_car == flag_z, "JZ gating");
      if (ca.ic_res_c) chk(ca.pcl_car == flag_c || ca.pch_car == flag_c, "JC gating");
      if (ic == 8'h3F) chk(ca.pcl_car, "unconditional PCL load passes");
      chk(eoi == (ic == 8'h0E || ic == 8'h4B || ic == 8'h55 || ic == 8'h40), "eoi only in last word");
      @(negedge clk);
      if (ca.rom_rd) p++;
    end while (ic != 8'h00 && tlen < 16);
  endtask

  initial begin
    logic [7:0] exp_alu [4] = '{8'h00, 8'h01, 8'h0D, 8'h0E};
    logic [7:0] exp_jz [10] = '{8'h00, 8'h01, 8'h2A, 8'h2B, 8'h46, 8'h47, 8'h48, 8'h49, 8'h4A, 8'h4B};
    rst = 1; flag_z = 0; flag_c = 0; instruction = 0;
    @(negedge clk);
    rst = 0;
    // ALU Rn with op 010 and register 3
    bytes[0] = 8'h5A;
    run_instr(1);
    chk(tlen == 4, "ALU Rn takes 4 cycles");
    for (int i = 0; i < 4; i++) chk(trace[i] == exp_alu[i], "ALU Rn IC trace");
    chk(reg_sel == 2'd3 && alu_sel == 3'd2, "RI fields");
    // JZ with Z = 0, then Z = 1; JC with C = 1, then C = 0
    for (int k = 0; k < 4; k++) begin
      flag_z = (k == 1);
      flag_c = (k == 2);
      bytes[0] = 8'h07; bytes[1] = (k < 2) ? 8'h04 : 8'h05; bytes[2] = 8'h12; bytes[3] = 8'h34;
      run_instr(4);
      chk(tlen == 10, "JZ / JC take 10 cycles");
      for (int i = 0; i < 4; i++) chk(trace[i] == exp_jz[i], "prefix IC trace");
      if (k < 2) for (int i = 4; i < 10; i++) chk(trace[i] == exp_jz[i], "JZ IC trace");
      else       for (int i = 4; i < 10; i++) chk(trace[i] == exp_jz[i] + 8'h0A, "JC IC trace");
    end
    // JMP: unconditional PC loads
    bytes[0] = 8'h07; bytes[1] = 8'h03; bytes[2] = 8'h00; bytes[3] = 8'h00;
    flag_z = 0; flag_c = 0;
    run_instr(4);
    chk(tlen == 8, "JMP takes 8 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
