// ram_storage -- M++ data RAM, 256 x 8, holding data and the call stack.
//
// Synchronous write: on a rising clock edge with cs and we high, mem[addr]
// takes wdata. Combinational read: rdata is mem[addr], so a byte can be put
// on the data bus in the same micro-cycle that addresses it. The size
// follows the 8-bit RAM address of the published design; the contents are
// not cleared by reset.
module ram_storage #(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     cs,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs && we) mem[addr] <= wdata;
  end

  always_comb rdata = mem[addr];

endmodule
