// ram_addresser -- M++ data-RAM address unit.
//
// Holds the DIR buffer, loaded from the data bus when dir_car (DIRcar) is
// high, and the stack pointer SP (inc_dec_counter, counted by sp_car /
// sp_dec). The RAM address is DIR when sel_sp (SelSP) is 0 and SP when it
// is 1, as in the published address multiplexer. DIR and SP change on the
// rising clock edge; the address output is combinational.
module ram_addresser (
  input  logic       clk,
  input  logic       rst,
  input  logic       dir_car,
  input  logic       sp_car,
  input  logic       sp_dec,
  input  logic       sel_sp,
  input  logic [7:0] bus,
  output logic [7:0] addr,
  output logic [7:0] sp
);

  logic [7:0] dir;

  buffer_reg #(.W(8)) u_dir (
    .clk(clk), .rst(rst), .load(dir_car), .d(bus), .q(dir)
  );

  inc_dec_counter #(.W(8)) u_sp (
    .clk(clk), .rst(rst), .set(sp_car), .ctrl(sp_dec), .out(sp)
  );

  always_comb addr = sel_sp ? sp : dir;

endmodule
