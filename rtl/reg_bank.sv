// reg_bank -- M++ register bank: four 8-bit registers B, C, D, E.
//
// sel (S1:S0, from RI[4:3]) picks one register: 0 = B, 1 = C, 2 = D, 3 = E.
// On a rising clock edge with load (Carga / REGcar) high the selected
// register takes 'in' (the data bus); rst clears all four, as the published
// bank does. 'out' is the selected register, combinational; whether it
// drives the bus (REGbus) is decided by the bus selector of the core.
module reg_bank #(
  parameter int NREGS = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] sel,
  input  logic                     load,
  input  logic [7:0]               in,
  output logic [7:0]               out
);

  logic [7:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (load) begin
      regs[sel] <= in;
    end
  end

  always_comb out = regs[sel];

endmodule
