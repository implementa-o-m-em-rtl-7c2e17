// ram_decode -- M++ instruction decoder ROM (16 x 8).
//
// Maps the 4-bit decoder address {High Decoder, RI[2:0]} to the micro-address
// where the instruction's microroutine starts. The sixteen entries are the
// published M++ decoder table (see mpp_pkg::decode_entry). The read is purely
// combinational; the published chip enable is not used because the decoder is
// always selected.
module ram_decode
  import mpp_pkg::*;
(
  input  logic [3:0] addr,
  output logic [7:0] data
);

  always_comb data = decode_entry(addr);

endmodule
