// mpp -- the M++ processor core: an 8-bit microprogrammed accumulator CPU.
//
// All units share one 8-bit data bus. Each micro-instruction (one clock
// cycle) enables at most one bus source and any number of loads, which take
// the bus value at the rising clock edge. The bus selector takes the first
// active source in this order: program byte (ROMrd), data RAM (RAMcs and
// RAMrd), PC high (PCHbus), PC low (PCLbus), register bank (REGbus),
// accumulator (ACbus), ALU result (ULAbus), input port (INbus); with no
// source the bus reads 0. An assertion checks that the microprogram never
// enables two sources at once.
//
// Units: ctrl_module (RI, IC, decoder, control memories), program_addresser
// (16-bit PC), reg_bank (B, C, D, E), accumulator (A), buffer_reg BUF (ALU
// operand B), alu (with flags Z, C), ram_addresser (DIR, SP) with
// ram_storage (256 x 8), and buffer_reg OUT, the output-port register.
//
// Program memory is outside the core, as in the published design:
// program_addr is the PC, instruction is the byte at that address, and the
// memory is selected while out_signals[1] (ROMcs) is high. out_signals:
// [0] ROMrd, [1] ROMcs, [2] INbus (input port read), [3] OUTcar (output
// port write), [4] end of instruction. Bits 2..4 and the rst input are this
// design's additions.
module mpp
  import mpp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  instruction,
  output logic [4:0]  out_signals,
  output logic [15:0] program_addr,
  input  logic [7:0]  in,
  output logic [7:0]  out
);

  ctrl_a_t    ca;
  ctrl_b_t    cb;
  logic [1:0] reg_sel;
  logic [2:0] alu_sel;
  logic       eoi;

  logic [7:0] bus;
  logic [7:0] program_low, program_high;
  logic [7:0] reg_bank_out, acc_out, acc_buffer, alu_buffer, alu_out;
  logic [7:0] storage_addr, storage_data_out;
  logic       alu_fc, alu_fz;
  logic       storage_rd;

  ctrl_module cm (
    .clk(clk), .rst(rst), .instruction(bus), .flag_z(alu_fz), .flag_c(alu_fc),
    .ctrl_a(ca), .ctrl_b(cb), .reg_sel(reg_sel), .alu_sel(alu_sel), .eoi(eoi), .ic()
  );

  program_addresser #(.AW(16)) pa (
    .clk(clk), .rst(rst), .sel_data(ca.sel_data_pc), .pcl_car(ca.pcl_car),
    .pch_car(ca.pch_car), .in(bus), .out_low(program_low), .out_high(program_high)
  );

  reg_bank #(.NREGS(4)) rb (
    .clk(clk), .rst(rst), .sel(reg_sel), .load(cb.reg_car), .in(bus), .out(reg_bank_out)
  );

  accumulator #(.W(8)) acc (
    .clk(clk), .rst(rst), .load(cb.ac_car), .in(bus), .out(acc_out), .buffer(acc_buffer)
  );

  buffer_reg #(.W(8)) bufr (
    .clk(clk), .rst(rst), .load(cb.buf_car), .d(bus), .q(alu_buffer)
  );

  alu #(.W(8)) al (
    .clk(clk), .rst(rst), .sel(alu_sel), .en(cb.ula_bus), .in_a(acc_buffer),
    .in_b(alu_buffer), .out(alu_out), .flag_c(alu_fc), .flag_z(alu_fz)
  );

  ram_addresser ra (
    .clk(clk), .rst(rst), .dir_car(ca.dir_car), .sp_car(ca.sp_car), .sp_dec(ca.sp_dec),
    .sel_sp(cb.sel_sp), .bus(bus), .addr(storage_addr), .sp()
  );

  ram_storage #(.DEPTH(256)) rs (
    .clk(clk), .cs(cb.ram_cs), .we(cb.ram_wr), .addr(storage_addr), .wdata(bus),
    .rdata(storage_data_out)
  );

  buffer_reg #(.W(8)) outr (
    .clk(clk), .rst(rst), .load(cb.out_car), .d(bus), .q(out)
  );

  assign storage_rd = cb.ram_cs & cb.ram_rd;

  always_comb begin
    if      (ca.rom_rd)  bus = instruction;
    else if (storage_rd) bus = storage_data_out;
    else if (ca.pch_bus) bus = program_high;
    else if (ca.pcl_bus) bus = program_low;
    else if (cb.reg_bus) bus = reg_bank_out;
    else if (cb.ac_bus)  bus = acc_out;
    else if (cb.ula_bus) bus = alu_out;
    else if (cb.in_bus)  bus = in;
    else                 bus = 8'h00;
  end

  assign program_addr = {program_high, program_low};
  assign out_signals  = {eoi, cb.out_car, cb.in_bus, ca.rom_cs, ca.rom_rd};

  // One bus source per micro-instruction.
  a_one_bus_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ca.rom_rd, storage_rd, ca.pch_bus, ca.pcl_bus, cb.reg_bus, cb.ac_bus,
              cb.ula_bus, cb.in_bus}));

  // The program byte is read only while the program memory is selected.
  a_rom_select: assert property (@(posedge clk) disable iff (rst)
    ca.rom_rd |-> ca.rom_cs);

endmodule
