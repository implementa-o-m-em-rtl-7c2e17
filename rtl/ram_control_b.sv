// ram_control_b -- M++ control memory B (256 x 16 ROM).
//
// Holds the data-path half of every micro-instruction: register bank,
// accumulator, ALU buffer and ALU bus enables, RAM chip select / read /
// write and SP-or-DIR select, input-port read and output-port load (bit
// layout in mpp_pkg::ctrl_b_t, bits 15:12 unused). The contents come from
// the microprogram mpp_pkg::ucode, which is this design's own; the 256 x 16
// size follows the published schematic. Combinational read.
module ram_control_b
  import mpp_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [15:0]              data
);

  logic [15:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = ucode_b(8'(i));
  end

  always_comb data = rom[addr];

endmodule
