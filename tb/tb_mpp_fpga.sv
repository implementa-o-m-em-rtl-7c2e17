// tb_mpp_fpga -- end-to-end test of the M++ FPGA top at its default size.
//
// Loads programs through the program-load port with the CPU in reset, runs
// them, and after every instruction (eoi) compares the CPU's architectural
// state -- A, B..E, PC, SP, flags, output port and the whole data RAM --
// with an instruction-level reference model kept in this testbench. It also
// checks the number of clock cycles every instruction takes against the
// microprogram's timing (2 fetch cycles, 2 more for the 07 prefix, then
// the routine).
//
// Programs: (1) the published demonstration loop (MOV 55,A; MOV 66,B;
// ADD B,A; MOV A,B; MOV A,OUT1; CALL; JMP), (2) the published stimulus
// program (MOV 55,A; MOV 66,B; CALL 000E; JMP 0000; RET), the published
// call-stack example (CALL SUBROT; JMP Loop; SUBROT: RET), (3) a directed
// program covering every opcode, taken and not-taken JZ / JC, nested CALL,
// STA / LDA and the ALU operations, (4) random straight-line programs.
// Each mechanism is counted and one that never happened is a failure.
module tb_mpp_fpga;
  import mpp_pkg::*;

  logic        clk = 0;
  logic        rst;
  logic        prog_we;
  logic [15:0] prog_waddr;
  logic [7:0]  prog_wdata;
  logic [7:0]  in;
  logic [7:0]  out;
  logic        eoi;

  mpp_fpga dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_waddr(prog_waddr),
    .prog_wdata(prog_wdata), .in(in), .out(out), .eoi(eoi)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- program image
  logic [7:0] prog [65536];
  int         plen;

  task automatic emit(input logic [7:0] b);
    prog[plen] = b;
    plen++;
  endtask

  task automatic org(input int a);
    plen = a;
  endtask

  // ------------------------------------------------------ reference model
  logic [7:0]  m_a, m_out, m_sp;
  logic [7:0]  m_r [4];
  logic [15:0] m_pc;
  logic        m_z, m_c;
  logic [7:0]  m_ram [256];

  // mechanism counters
  int n_op [16];
  int n_jz_taken, n_jz_not, n_jc_taken, n_jc_not, n_nested, n_flag_z, n_flag_c;
  int n_alu [8];
  int depth;

  function automatic logic [8:0] ref_alu(input logic [2:0] op, input logic [7:0] a,
                                         input logic [7:0] b);
    logic [8:0] r;
    case (op)
      3'd0: r = {1'b0, a} + {1'b0, b};
      3'd1: r = {(a < b), 8'(a - b)};
      3'd2: r = {1'b0, a & b};
      3'd3: r = {1'b0, a | b};
      3'd4: r = {1'b0, a ^ b};
      3'd5: r = {1'b0, ~b};
      3'd6: r = {1'b0, b};
      default: r = {1'b0, b} + 9'd1;
    endcase
    return r;
  endfunction

  task automatic do_alu(input logic [2:0] op, input logic [7:0] a, input logic [7:0] b,
                        output logic [7:0] res);
    logic [8:0] r;
    r = ref_alu(op, a, b);
    res = r[7:0];
    m_c = r[8];
    m_z = (r[7:0] == 8'h00);
    n_alu[op]++;
    if (m_z) n_flag_z++;
    if (m_c) n_flag_c++;
  endtask

  // Executes one instruction in the model and returns its cycle count.
  task automatic ref_step(output int cycles);
    logic [7:0] op, x, h, l, ad, res;
    logic [15:0] ret;
    op = prog[m_pc]; m_pc++;
    cycles = 2;
    case (op[2:0])
      3'd0: begin m_r[op[4:3]] = m_a; cycles += 1; end
      3'd1: begin m_a = m_r[op[4:3]]; cycles += 1; end
      3'd2: begin do_alu(op[7:5], m_a, m_r[op[4:3]], res); m_a = res; cycles += 2; end
      3'd3: begin m_a = in; cycles += 1; end
      3'd4: begin
        m_pc = {m_ram[8'(m_sp + 1)], m_ram[m_sp]};
        m_sp = m_sp + 8'd4;
        depth--;
        cycles += 4;
      end
      3'd5: begin do_alu(op[7:5], m_a, m_a, res); m_a = res; cycles += 2; end
      3'd6: begin m_out = m_a; cycles += 1; end
      default: begin
        x = prog[m_pc]; m_pc++;
        cycles += 2;
        case (x[2:0])
          3'd0: begin do_alu(x[7:5], m_a, prog[m_pc], res); m_a = res; m_pc++; cycles += 2; end
          3'd1: begin do_alu(x[7:5], m_a, prog[m_pc], res); m_r[x[4:3]] = res; m_pc++; cycles += 2; end
          3'd2: begin ad = prog[m_pc]; m_pc++; m_ram[ad] = m_a; cycles += 2; end
          3'd3: begin
            h = prog[m_pc]; l = prog[m_pc + 16'd1];
            m_ram[8'(m_sp - 1)] = h;
            m_pc = {h, l};
            cycles += 4;
          end
          3'd4, 3'd5: begin
            h = prog[m_pc]; l = prog[m_pc + 16'd1];
            m_pc += 16'd2;
            m_ram[8'(m_sp - 1)] = h;
            m_ram[8'(m_sp - 2)] = l;
            if (x[2:0] == 3'd4) begin
              if (m_z) begin m_pc = {h, l}; n_jz_taken++; end else n_jz_not++;
            end else begin
              if (m_c) begin m_pc = {h, l}; n_jc_taken++; end else n_jc_not++;
            end
            cycles += 6;
          end
          3'd6: begin
            h = prog[m_pc]; l = prog[m_pc + 16'd1];
            ret = m_pc + 16'd2;
            m_ram[8'(m_sp - 1)] = h;
            m_ram[8'(m_sp - 2)] = l;
            m_ram[8'(m_sp - 3)] = ret[15:8];
            m_ram[8'(m_sp - 4)] = ret[7:0];
            m_sp = m_sp - 8'd4;
            m_pc = {h, l};
            depth++;
            if (depth >= 2) n_nested++;
            cycles += 15;
          end
          default: begin ad = prog[m_pc]; m_pc++; m_a = m_ram[ad]; cycles += 2; end
        endcase
        n_op[{1'b1, x[2:0]}]++;
      end
    endcase
    if (op[2:0] != 3'd7) n_op[{1'b0, op[2:0]}]++;
    n_op[7] += (op[2:0] == 3'd7) ? 1 : 0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  task automatic compare_state(input string tag);
    bit ram_ok;
    check(dut.m1.acc.a == m_a, {tag, ": A"});
    for (int i = 0; i < 4; i++) check(dut.m1.rb.regs[i] == m_r[i], {tag, ": register"});
    check({dut.m1.pa.out_high, dut.m1.pa.out_low} == m_pc, {tag, ": PC"});
    check(dut.m1.ra.sp == m_sp, {tag, ": SP"});
    check(out == m_out, {tag, ": out"});
    check(dut.m1.al.flag_z == m_z && dut.m1.al.flag_c == m_c, {tag, ": flags"});
    ram_ok = 1;
    for (int i = 0; i < 256; i++) if (dut.m1.rs.mem[i] != m_ram[i]) ram_ok = 0;
    check(ram_ok, {tag, ": data RAM"});
  endtask

  // Loads prog[0 .. plen-1] with the CPU in reset, then releases it.
  task automatic load_and_reset();
    rst = 1;
    prog_we = 0;
    @(negedge clk);
    for (int i = 0; i < plen; i++) begin
      prog_we = 1; prog_waddr = 16'(i); prog_wdata = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    m_a = 0; m_out = 0; m_sp = 0; m_pc = 0; m_z = 0; m_c = 0; depth = 0;
    for (int i = 0; i < 4; i++) m_r[i] = 0;
    for (int i = 0; i < 256; i++) m_ram[i] = dut.m1.rs.mem[i];
    rst = 0;
  endtask

  // Runs until the model reaches stop_pc as a self-loop, or max_instr.
  task automatic run(input string tag, input int max_instr, input int stop_pc);
    int cyc, exp_cyc, n;
    logic [15:0] pc_before;
    n = 0;
    cyc = 1;  // the cycle in which rst was released is the first fetch cycle
    while (n < max_instr) begin
      @(negedge clk);
      cyc++;
      if (eoi) begin
        pc_before = m_pc;
        ref_step(exp_cyc);
        @(posedge clk);
        #1;
        check(cyc == exp_cyc, {tag, ": instruction cycle count"});
        if (cyc != exp_cyc && failures < 20)
          $display("  pc=%h cycles %0d expected %0d", pc_before, cyc, exp_cyc);
        compare_state(tag);
        cyc = 0;
        n++;
        if (stop_pc >= 0 && pc_before == 16'(stop_pc) && m_pc == 16'(stop_pc)) break;
        if (tag == "directed" && m_pc == 16'h0070) begin
          check(0, {tag, ": reached trap"});
          break;
        end
      end
    end
  endtask

  // ------------------------------------------------------------ programs
  // The published stimulus program bytes, 0x0000..0x0010.
  logic [7:0] prog_stim [17] = '{8'h07, 8'hC0, 8'h55, 8'h07, 8'hC1, 8'h66, 8'h07, 8'h06,
                                 8'h00, 8'h0E, 8'h07, 8'h03, 8'h00, 8'h00, 8'h04, 8'h07,
                                 8'h07};

  task automatic prog_demo();
    // Loop: MOV 55,A; MOV 66,B; ADD B,A; MOV A,B; MOV A,OUT1; CALL MOVE;
    // JMP Loop; MOVE: RET
    plen = 0;
    emit(8'h07); emit(8'hC0); emit(8'h55);
    emit(8'h07); emit(8'hC1); emit(8'h66);
    emit(8'h02);
    emit(8'h00);
    emit(8'h0E);
    emit(8'h07); emit(8'h06); emit(8'h00); emit(8'h11);
    emit(8'h07); emit(8'h03); emit(8'h00); emit(8'h00);
    emit(8'h04);
  endtask

  task automatic prog_stimulus();
    plen = 0;
    foreach (prog_stim[i]) emit(prog_stim[i]);
  endtask

  task automatic prog_directed();
    plen = 0;
    emit(8'h03);                                           // 00 IN
    emit(8'h08);                                           // 01 MOV A,C
    emit(8'h07); emit(8'h00); emit(8'h20);                 // 02 ADD #20
    emit(8'h07); emit(8'h05); emit(8'h00); emit(8'h0A);    // 05 JC 000A
    emit(8'h06);                                           // 09 OUT (skipped)
    emit(8'h07); emit(8'h04); emit(8'h00); emit(8'h70);    // 0A JZ 0070 (not taken)
    emit(8'h07); emit(8'hC0); emit(8'h03);                 // 0E MOV #3,A
    emit(8'h07); emit(8'h20); emit(8'h01);                 // 11 SUB #1
    emit(8'h06);                                           // 14 OUT
    emit(8'h07); emit(8'h04); emit(8'h00); emit(8'h1D);    // 15 JZ 001D
    emit(8'h07); emit(8'h03); emit(8'h00); emit(8'h11);    // 19 JMP 0011
    emit(8'h07); emit(8'hC1); emit(8'h5A);                 // 1D MOV #5A,B
    emit(8'h07); emit(8'hC9); emit(8'hA5);                 // 20 MOV #A5,C
    emit(8'h07); emit(8'hD1); emit(8'h0F);                 // 23 MOV #0F,D
    emit(8'h07); emit(8'hD9); emit(8'hFF);                 // 26 MOV #FF,E
    emit(8'h01);                                           // 29 MOV B,A
    emit(8'h4A);                                           // 2A AND C
    emit(8'h6A);                                           // 2B OR C
    emit(8'h92);                                           // 2C XOR D
    emit(8'h1A);                                           // 2D ADD E
    emit(8'hA5);                                           // 2E NOT A
    emit(8'hE5);                                           // 2F INC A
    emit(8'h05);                                           // 30 ADD A,A
    emit(8'h07); emit(8'h02); emit(8'h80);                 // 31 STA 80
    emit(8'h07); emit(8'hC0); emit(8'h00);                 // 34 MOV #0,A
    emit(8'h07); emit(8'h07); emit(8'h80);                 // 37 LDA 80
    emit(8'h07); emit(8'h06); emit(8'h00); emit(8'h50);    // 3A CALL 0050
    emit(8'h06);                                           // 3E OUT
    emit(8'h07); emit(8'h03); emit(8'h00); emit(8'h3F);    // 3F JMP 003F (end)
    org(16'h50);
    emit(8'h07); emit(8'h06); emit(8'h00); emit(8'h60);    // 50 CALL 0060
    emit(8'h10);                                           // 54 MOV A,D
    emit(8'h04);                                           // 55 RET
    org(16'h60);
    emit(8'h07); emit(8'h29); emit(8'h01);                 // 60 SUB #1 -> C
    emit(8'h07); emit(8'h05); emit(8'h00); emit(8'h70);    // 63 JC 0070 (not taken)
    emit(8'h06);                                           // 67 OUT
    emit(8'h04);                                           // 68 RET
    org(16'h70);
    emit(8'h07); emit(8'h03); emit(8'h00); emit(8'h70);    // 70 trap: JMP 0070
  endtask

  // Random straight-line code without jumps, ending in JMP to itself.
  task automatic prog_random(input int n);
    logic [7:0] b;
    int k;
    plen = 0;
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(0, 9);
      b = 8'($urandom);
      case (k)
        0: emit({3'b000, b[4:3], 3'd0});
        1: emit({3'b000, b[4:3], 3'd1});
        2: emit({b[7:3], 3'd2});
        3: emit({b[7:3], 3'd3});
        4: emit({b[7:3], 3'd5});
        5: emit({b[7:3], 3'd6});
        6: begin emit(8'h07); emit({b[7:3], 3'd0}); emit(8'($urandom)); end
        7: begin emit(8'h07); emit({b[7:3], 3'd1}); emit(8'($urandom)); end
        8: begin emit(8'h07); emit({b[7:3], 3'd2}); emit(8'($urandom_range(0, 127))); end
        default: begin emit(8'h07); emit({b[7:3], 3'd7}); emit(8'($urandom_range(0, 127))); end
      endcase
    end
    b = 8'(plen >> 8);
    emit(8'h07); emit(8'h03); emit(b); emit(8'(plen - 3));
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int cyc_demo;
    rst = 1;
    prog_we = 0;
    prog_waddr = 0;
    prog_wdata = 0;
    in = 8'h14;
    repeat (3) @(negedge clk);

    // (1) demonstration loop, three iterations (8 instructions each)
    prog_demo();
    load_and_reset();
    run("demo", 24, -1);
    check(out == 8'hBB, "demo: output port shows 55+66");

    // (2) stimulus program: CALL 000E / RET / JMP 0000, three iterations
    prog_stimulus();
    load_and_reset();
    run("stimulus", 15, -1);
    check(dut.m1.rs.mem[8'hFC] == 8'h0A && dut.m1.rs.mem[8'hFD] == 8'h00 &&
          dut.m1.rs.mem[8'hFE] == 8'h0E && dut.m1.rs.mem[8'hFF] == 8'h00,
          "stimulus: call frame at FC..FF");

    // (2b) call-stack example: Loop: CALL SUBROT; JMP Loop; SUBROT: RET
    plen = 0;
    emit(8'h07); emit(8'h06); emit(8'h00); emit(8'h08);
    emit(8'h07); emit(8'h03); emit(8'h00); emit(8'h00);
    emit(8'h04);
    load_and_reset();
    run("call stack", 9, -1);
    check(dut.m1.rs.mem[8'hFC] == 8'h04 && dut.m1.rs.mem[8'hFD] == 8'h00 &&
          dut.m1.rs.mem[8'hFE] == 8'h08 && dut.m1.rs.mem[8'hFF] == 8'h00 &&
          dut.m1.ra.sp == 8'h00, "call stack: frame at FC..FF, SP back at 0");

    // (3) directed program
    in = 8'hF0;
    prog_directed();
    load_and_reset();
    run("directed", 200, 16'h3F);
    check({dut.m1.pa.out_high, dut.m1.pa.out_low} == 16'h003F, "directed: reached end");

    // (4) random programs
    for (int t = 0; t < 20; t++) begin
      in = 8'($urandom);
      prog_random(60);
      load_and_reset();
      run("random", 100, plen - 4);
    end

    // mechanisms
    for (int i = 0; i < 16; i++) begin
      check(n_op[i] > 0, "mechanism: every opcode and prefixed opcode executed");
      if (n_op[i] == 0) $display("  opcode slot %0d never executed", i);
    end
    for (int i = 0; i < 8; i++) check(n_alu[i] > 0, "mechanism: every ALU operation");
    check(n_jz_taken > 0, "mechanism: JZ taken");
    check(n_jz_not > 0, "mechanism: JZ not taken");
    check(n_jc_taken > 0, "mechanism: JC taken");
    check(n_jc_not > 0, "mechanism: JC not taken");
    check(n_nested > 0, "mechanism: nested CALL");
    check(n_flag_z > 0, "mechanism: Z flag set");
    check(n_flag_c > 0, "mechanism: C flag set");
    $display("opcodes executed: %p", n_op);
    $display("ALU ops: %p  JZ t/n %0d/%0d  JC t/n %0d/%0d  nested %0d",
             n_alu, n_jz_taken, n_jz_not, n_jc_taken, n_jc_not, n_nested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
