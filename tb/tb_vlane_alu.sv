// tb_vlane_alu: random operands through every ALU and flag operation,
// compared with results computed here.
module tb_vlane_alu;
  import svp_pkg::*;
  vop_e op;
  logic uns, fa, fb, fres;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  vlane_alu #(.VPW(32), .MULTW(16)) dut (.*);

  function automatic logic [31:0] ref_y(vop_e o, logic u, logic [31:0] x, logic [31:0] z);
    logic lt;
    lt = u ? (x < z) : ($signed(x) < $signed(z));
    case (o)
      VADD: return x + z;
      VSUB: return x - z;
      VMUL: return u ? {16'd0, x[15:0]} * {16'd0, z[15:0]}
                     : 32'($signed({{16{x[15]}}, x[15:0]}) * $signed({{16{z[15]}}, z[15:0]}));
      VAND: return x & z;
      VOR:  return x | z;
      VXOR: return x ^ z;
      VSLL: return x << z[4:0];
      VSRL: return x >> z[4:0];
      VSRA: return 32'($signed(x) >>> z[4:0]);
      VROT: return (x >> z[4:0]) | ((z[4:0] == 0) ? 32'd0 : (x << (32 - z[4:0])));
      VABSDIFF: return lt ? z - x : x - z;
      VMIN: return lt ? x : z;
      VMAX: return lt ? z : x;
      VMOV: return z;
      default: return 0;
    endcase
  endfunction

  function automatic logic ref_f(vop_e o, logic u, logic [31:0] x, logic [31:0] z, logic p, logic q);
    logic lt;
    lt = u ? (x < z) : ($signed(x) < $signed(z));
    case (o)
      VCMPEQ: return x == z;
      VCMPLT: return lt;
      VCMPLE: return lt || x == z;
      VFAND: return p & q;
      VFOR: return p | q;
      VFXOR: return p ^ q;
      VFNOT: return !p;
      VFMOV: return p;
      VFSET: return 1;
      VFCLR: return 0;
      default: return 0;
    endcase
  endfunction

  vop_e ops[] = '{VADD, VSUB, VMUL, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VROT, VABSDIFF, VMIN,
                  VMAX, VMOV, VCMPEQ, VCMPLT, VCMPLE, VFAND, VFOR, VFXOR, VFNOT, VFMOV,
                  VFSET, VFCLR};
  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = ops[$urandom % ops.size()];
      uns = 1'($urandom); fa = 1'($urandom); fb = 1'($urandom);
      a = $urandom; b = ($urandom % 3 == 0) ? a : $urandom;
      if ($urandom % 4 == 0) b = b & 32'h1F;
      #1;
      checks += 2;
      if (y !== ref_y(op, uns, a, b)) begin
        failures++; $display("FAIL %s a=%h b=%h u=%0d y=%h exp %h", op.name(), a, b, uns, y, ref_y(op, uns, a, b));
      end
      if (fres !== ref_f(op, uns, a, b, fa, fb)) begin
        failures++; $display("FAIL flag %s", op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
