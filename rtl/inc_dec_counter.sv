// inc_dec_counter -- M++ stack pointer SP: 8-bit up/down counter.
//
// On a rising clock edge with set (SPcar) high the count goes up by one when
// ctrl (SPinc/dec) is 0 and down by one when it is 1, wrapping modulo 2^W.
// rst clears it to 0, the published reset value. The published counter
// steps on the rising edge of 'set'; here 'set' is a synchronous enable.
module inc_dec_counter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         set,
  input  logic         ctrl,
  output logic [W-1:0] out
);

  always_ff @(posedge clk) begin
    if (rst)       out <= '0;
    else if (set)  out <= ctrl ? out - W'(1) : out + W'(1);
  end

endmodule
