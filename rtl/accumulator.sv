// accumulator -- M++ accumulator A.
//
// An 8-bit register loaded from the data bus on a rising clock edge while
// load (Carga / ACcar) is high and cleared by rst. It has two outputs as in
// the published block: 'out' goes to the data bus (enabled by ACbus in the
// core's bus selector) and 'buffer' feeds ALU operand A permanently. Both
// carry the register's value.
module accumulator #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] in,
  output logic [W-1:0] out,
  output logic [W-1:0] buffer
);

  logic [W-1:0] a;

  always_ff @(posedge clk) begin
    if (rst)       a <= '0;
    else if (load) a <= in;
  end

  assign out    = a;
  assign buffer = a;

endmodule
