// vlane_alu: the functional units of one vector lane.
//
// Combinational. Computes one element result per cycle for the integer
// arithmetic, logic, shift/rotate, absolute-difference, min/max, move,
// multiply and compare instructions, and the flag-logic instructions.
// The multiplier takes the low MULTW bits of each operand (signed unless
// `uns`) and returns the low VPW bits of the product. Shifts and rotates use
// the low log2(VPW) bits of b; vrot rotates right. Compares produce `fres`
// (a<b, a<=b, a==b; unsigned when `uns`). Flag instructions combine the flag
// operands fa/fb into `fres`.
// Interface: op/uns select the operation; a, b are the element operands;
// y and fres are the element and flag results.
module vlane_alu
  import svp_pkg::*;
#(
  parameter int unsigned VPW   = VPW_D,
  parameter int unsigned MULTW = MULTW_D
) (
  input  vop_e           op,
  input  logic           uns,
  input  logic [VPW-1:0] a,
  input  logic [VPW-1:0] b,
  input  logic           fa,
  input  logic           fb,
  output logic [VPW-1:0] y,
  output logic           fres
);
  localparam int unsigned SHW = $clog2(VPW);
  localparam int unsigned MW  = (MULTW == 0) ? 1 : MULTW;

  logic [SHW-1:0]   sh;
  logic             lt, eq;
  logic [VPW-1:0]   diff_ab, diff_ba;
  logic [2*MW-1:0]  prod;

  assign sh      = b[SHW-1:0];
  assign eq      = (a == b);
  assign lt      = uns ? (a < b) : ($signed(a) < $signed(b));
  assign diff_ab = a - b;
  assign diff_ba = b - a;

  always_comb begin
    if (uns) prod = {{MW{1'b0}}, a[MW-1:0]} * {{MW{1'b0}}, b[MW-1:0]};
    else     prod = (2*MW)'($signed(a[MW-1:0]) * $signed(b[MW-1:0]));
  end

  always_comb begin
    y = '0;
    unique case (op)
      VADD:     y = a + b;
      VSUB:     y = diff_ab;
      VMUL:     y = (MULTW == 0) ? '0 : VPW'(prod);
      VAND:     y = a & b;
      VOR:      y = a | b;
      VXOR:     y = a ^ b;
      VSLL:     y = a << sh;
      VSRL:     y = a >> sh;
      VSRA:     y = VPW'($signed(a) >>> sh);
      VROT:     y = VPW'({a, a} >> sh);
      VABSDIFF: y = lt ? diff_ba : diff_ab;
      VMIN:     y = lt ? a : b;
      VMAX:     y = lt ? b : a;
      VMOV:     y = b;            // vmov copies operand b (register vb or scalar)
      default:  y = '0;
    endcase
  end

  always_comb begin
    fres = 1'b0;
    unique case (op)
      VCMPEQ: fres = eq;
      VCMPLT: fres = lt;
      VCMPLE: fres = lt | eq;
      VFAND:  fres = fa & fb;
      VFOR:   fres = fa | fb;
      VFXOR:  fres = fa ^ fb;
      VFNOT:  fres = ~fa;
      VFMOV:  fres = fa;
      VFSET:  fres = 1'b1;
      VFCLR:  fres = 1'b0;
      default: fres = 1'b0;
    endcase
  end

endmodule
