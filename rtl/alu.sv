// alu -- M++ ALU ("ULA"): eight 8-bit operations and the Z / C flags.
//
// sel (from RI[7:5]) chooses: 000 A+B, 001 A-B, 010 A&B, 011 A|B, 100 A^B,
// 101 ~B, 110 B, 111 B+1, the published operation table. A is the
// accumulator, B the operand buffer BUF. 'out' is combinational. The flags
// are flip-flops that take the new values on a rising clock edge while en
// (ULAbus, the result going onto the bus) is high: FZ = result is zero;
// FC = carry out for A+B and B+1, borrow (A < B) for A-B, 0 otherwise. The
// carry and borrow rules are this design's reading of the adder/subtractor
// and incrementer carry outputs; rst clears both flags.
module alu
  import mpp_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   sel,
  input  logic         en,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic [W-1:0] out,
  output logic         flag_c,
  output logic         flag_z
);

  logic         carry;
  logic [W:0]   wide;

  always_comb begin
    wide  = '0;
    carry = 1'b0;
    unique case (alu_op_t'(sel))
      ALU_ADD:  begin wide = {1'b0, in_a} + {1'b0, in_b}; carry = wide[W]; end
      ALU_SUB:  begin wide = {1'b0, in_a} - {1'b0, in_b}; carry = wide[W]; end
      ALU_AND:  wide = {1'b0, in_a & in_b};
      ALU_OR:   wide = {1'b0, in_a | in_b};
      ALU_XOR:  wide = {1'b0, in_a ^ in_b};
      ALU_NOT:  wide = {1'b0, ~in_b};
      ALU_PASS: wide = {1'b0, in_b};
      ALU_INC:  begin wide = {1'b0, in_b} + 1'b1; carry = wide[W]; end
    endcase
    out = wide[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flag_c <= 1'b0;
      flag_z <= 1'b0;
    end else if (en) begin
      flag_c <= carry;
      flag_z <= (out == '0);
    end
  end

endmodule
