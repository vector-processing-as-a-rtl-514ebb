// vflag_file: one lane's partition of the vector flag registers.
//
// Each lane keeps NVFLAG one-bit flags for each of its ELEMS element slots.
// Flags vf0 and vf1 are the two execution masks an instruction can select;
// the others are general-purpose or receive compare results. The flags are
// small, so they are flip-flops with combinational read: the three read
// ports (two operands and the mask) are used in the execute stage, and the
// write port takes effect at the end of that stage.
// Reset sets every flag to 1, so that unmasked code runs with all elements
// enabled (own choice; reset behaviour is not published).
module vflag_file
  import svp_pkg::*;
#(
  parameter int unsigned ELEMS = MVL_D / NLANE_D
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [2:0]                   wsel,
  input  logic [$clog2(ELEMS)-1:0]     slot,
  input  logic                         wbit,
  input  logic [2:0]                   rsel_a,
  input  logic [2:0]                   rsel_b,
  input  logic                         msel,
  output logic                         ra,
  output logic                         rb,
  output logic                         mask
);
  logic [ELEMS-1:0] f [NVFLAG];

  assign ra   = f[rsel_a][slot];
  assign rb   = f[rsel_b][slot];
  assign mask = f[{2'b00, msel}][slot];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NVFLAG; i++) f[i] <= '1;
    end else if (we) begin
      f[wsel][slot] <= wbit;
    end
  end

endmodule
