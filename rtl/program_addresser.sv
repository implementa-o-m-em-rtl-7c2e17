// program_addresser -- M++ program counter, 16 bits in two 8-bit halves.
//
// Each half has its own load strobe, pcl_car (PCLcar) and pch_car (PCHcar),
// and a shared source select sel_data (SeldataPC): 0 = the incremented PC,
// 1 = the data bus. Asserting both strobes with sel_data = 0 advances the PC
// by one across all 16 bits; asserting one strobe with sel_data = 1 replaces
// that half with the bus byte, which is how jumps, calls and returns load a
// target one byte at a time. Loads happen on the rising clock edge (the
// published block uses the strobe edges instead); rst clears the PC.
// out_low / out_high are the two halves, driven onto the bus by PCLbus /
// PCHbus in the core and sent to program memory together as the address.
module program_addresser #(
  parameter int AW = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sel_data,
  input  logic            pcl_car,
  input  logic            pch_car,
  input  logic [7:0]      in,
  output logic [7:0]      out_low,
  output logic [AW-9:0]   out_high
);

  logic [AW-1:0] pc, incr_result;
  logic [7:0]    mid_low;
  logic [AW-9:0] mid_high;

  always_comb begin
    incr_result = pc + AW'(1);
    if (sel_data) begin
      mid_low  = in;
      mid_high = (AW-8)'(in);
    end else begin
      mid_low  = incr_result[7:0];
      mid_high = incr_result[AW-1:8];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else begin
      if (pcl_car) pc[7:0]    <= mid_low;
      if (pch_car) pc[AW-1:8] <= mid_high;
    end
  end

  assign out_low  = pc[7:0];
  assign out_high = pc[AW-1:8];

endmodule
