// ctrl_module -- M++ microprogrammed control unit.
//
// Parts, as in the published control-module schematic:
//   RI   instruction register, loaded from the data bus when RIcar is set.
//        RI[2:0] is the opcode, RI[4:3] the register select (REG1:REG0),
//        RI[7:5] the ALU operation (ULA2..ULA0).
//   IC   micro-instruction counter. Next value: 0 when ICres or rst, else
//        the decoder output when SelRI, else IC + 1.
//   ram_decode     16 x 8 ROM, address {High Decoder, RI[2:0]}.
//   ram_control_a / ram_control_b   256 x 16 control memories read at IC.
//   PC-load gate   PCLcar / PCHcar pass only when neither ICresZ nor ICresC
//        is set (the published NOR), or when ICresZ is set with flag Z = 1,
//        or ICresC with flag C = 1. This is how JZ / JC are conditional.
//
// Timing: the control word is combinational from IC, so every control line
// is valid for the whole clock cycle of its micro-instruction and every load
// it orders happens at the closing rising edge. eoi is high in the last
// cycle of each instruction (the word that sets ICres).
module ctrl_module
  import mpp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] instruction,   // data bus, into RI
  input  logic       flag_z,
  input  logic       flag_c,
  output ctrl_a_t    ctrl_a,        // word A with PCLcar / PCHcar gated
  output ctrl_b_t    ctrl_b,
  output logic [1:0] reg_sel,
  output logic [2:0] alu_sel,
  output logic       eoi,
  output logic [7:0] ic
);

  logic [7:0] ri;
  logic [7:0] decode_data;
  logic [7:0] ctrl_addr_next;
  logic [15:0] a_raw_bits, b_bits;
  ctrl_a_t    a_raw;
  logic       pchl_condition, pc_load_ok;

  ram_control_a #(.DEPTH(256)) u_rom_a (.addr(ic), .data(a_raw_bits));
  ram_control_b #(.DEPTH(256)) u_rom_b (.addr(ic), .data(b_bits));

  assign a_raw  = ctrl_a_t'(a_raw_bits);
  assign ctrl_b = ctrl_b_t'(b_bits);

  buffer_reg #(.W(8)) u_ri (
    .clk(clk), .rst(rst), .load(a_raw.ri_car), .d(instruction), .q(ri)
  );

  ram_decode u_decode (.addr({a_raw.high_dec, ri[2:0]}), .data(decode_data));

  always_comb ctrl_addr_next = a_raw.sel_ri ? decode_data : ic + 8'd1;

  always_ff @(posedge clk) begin
    if (rst || a_raw.ic_res) ic <= '0;
    else                     ic <= ctrl_addr_next;
  end

  always_comb begin
    pchl_condition = ~(a_raw.ic_res_z | a_raw.ic_res_c);
    pc_load_ok     = pchl_condition | (a_raw.ic_res_z & flag_z) | (a_raw.ic_res_c & flag_c);
    ctrl_a         = a_raw;
    ctrl_a.pcl_car = a_raw.pcl_car & pc_load_ok;
    ctrl_a.pch_car = a_raw.pch_car & pc_load_ok;
  end

  assign reg_sel = ri[4:3];
  assign alu_sel = ri[7:5];
  assign eoi     = a_raw.ic_res;

endmodule
