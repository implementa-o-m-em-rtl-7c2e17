// buffer_reg -- the M++ "Buffer 8bit": a register with load and reset.
//
// On a rising clock edge q takes d while load (Carga) is high and clears
// while rst (Reset) is high; reset wins. Used for the ALU operand buffer
// BUF, the RAM address buffer DIR and the output-port register. Width
// defaults to 8 as in the published schematics; the synchronous reset is
// this design's choice.
module buffer_reg #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
