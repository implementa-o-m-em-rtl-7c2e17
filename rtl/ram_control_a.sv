// ram_control_a -- M++ control memory A (256 x 16 ROM).
//
// Holds, for every micro-address, the sequencing and address-path half of
// the micro-instruction: IC reset/dispatch, RI load, program-ROM read, PC
// and SP control and the DIR load (bit layout in mpp_pkg::ctrl_a_t). The
// contents are built at elaboration from the microprogram mpp_pkg::ucode,
// which is this design's own; the 256 x 16 size follows the published
// schematic. Combinational read: the word follows IC in the same cycle.
module ram_control_a
  import mpp_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [15:0]              data
);

  logic [15:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = ucode_a(8'(i));
  end

  always_comb data = rom[addr];

endmodule
