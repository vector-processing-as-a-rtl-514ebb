// mac_unit: one distributed multiply-accumulator fed by four vector lanes.
//
// Every cycle that `acc_en` is high, the unit multiplies the four operand
// pairs it receives from its four lanes (each pair enabled by its own `en`
// bit, i.e. element active and mask set) and adds the sum of the products
// to its accumulator. Products use the low MULTW bits of each operand,
// signed. Units are connected in cascade chains of MACL: `cas_in` is the
// upstream unit's `cas_out` (0 for the first unit of a chain) and
// `cas_out = acc + cas_in`, so the last unit of a chain presents the chain's
// total. `zero` clears the accumulator (after vcczacc has copied the chain
// result); if `acc_en` and `zero` coincide the clear wins.
// Timing: the accumulator updates at the clock edge; cas_out is combinational.
module mac_unit
  import svp_pkg::*;
#(
  parameter int unsigned VPW   = VPW_D,
  parameter int unsigned MULTW = MULTW_D,
  parameter int unsigned ACCW  = MACW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  acc_en,
  input  logic                  zero,
  input  logic [3:0]            en,
  input  logic [3:0][VPW-1:0]   a,
  input  logic [3:0][VPW-1:0]   b,
  input  logic [ACCW-1:0]       cas_in,
  output logic [ACCW-1:0]       cas_out
);
  logic [ACCW-1:0] acc, psum;

  always_comb begin
    psum = '0;
    for (int i = 0; i < 4; i++) begin
      if (en[i]) psum = psum + ACCW'($signed(a[i][MULTW-1:0]) * $signed(b[i][MULTW-1:0]));
    end
  end

  assign cas_out = acc + cas_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (zero)   acc <= '0;
    else if (acc_en) acc <= acc + psum;
  end

endmodule
