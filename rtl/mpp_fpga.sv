// mpp_fpga -- FPGA top of the M++ CPU: core plus on-chip program memory.
//
// The core (mpp) fetches its program from program_memory, which it selects
// with ROMcs (chip select active low at the memory, ~out_signals[1]) and
// addresses with its 16-bit PC. A program is written into the memory through
// the prog_* port, one byte per clock while prog_we is high, with rst held
// high so the CPU does not run meanwhile; after rst falls the CPU starts at
// address 0. 'in' is the user input port (read by IN), 'out' the output
// port register (written by OUT). eoi pulses for one clock at the end of
// every instruction. The load port is this design's way of meeting the
// requirement to store the program in internal memory.
module mpp_fpga #(
  parameter int PROG_AW = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               prog_we,
  input  logic [PROG_AW-1:0] prog_waddr,
  input  logic [7:0]         prog_wdata,
  input  logic [7:0]         in,
  output logic [7:0]         out,
  output logic               eoi
);

  logic [7:0]  instruction;
  logic [4:0]  out_signals;
  logic [15:0] program_addr;

  mpp m1 (
    .clk(clk), .rst(rst), .instruction(instruction), .out_signals(out_signals),
    .program_addr(program_addr), .in(in), .out(out)
  );

  program_memory #(.AW(PROG_AW)) pm (
    .clk(clk), .cs_n(~out_signals[1]), .addr(program_addr[PROG_AW-1:0]),
    .rdata(instruction), .we(prog_we), .waddr(prog_waddr), .wdata(prog_wdata)
  );

  assign eoi = out_signals[4];

endmodule
