// program_memory -- on-chip M++ program store, 2^AW x 8.
//
// Read side: while cs_n (the CPU's program chip select, active low) is 0,
// rdata is the byte at addr, combinationally, so the byte reaches the data
// bus in the micro-cycle that reads it; otherwise rdata is 0. Load side: a
// rising clock edge with we high writes wdata at waddr; this is how a
// program is placed in the memory, with the CPU held in reset. The address
// width follows the 16-bit program address of the published core.
module program_memory #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          cs_n,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb rdata = cs_n ? 8'h00 : mem[addr];

endmodule
