// svp_pkg: shared constants and types of the soft vector processor.
//
// The defaults are the V8F configuration (8 lanes, maximum vector length 32,
// 32-bit datapath, byte-addressable vector memory access, 16-bit multipliers,
// MAC chains of two units, a private 256-word local-memory section per element).
// The vector instruction set follows the VIRAM-like set described for the
// processor (arithmetic, logic, flag, memory, MAC and scalar-transfer
// instructions); the 32-bit bit-level encoding below is this design's own,
// since no encoding is published for it.
//
// Instruction word (vinstr_t), MSB first:
//   op[31:26]  vd[25:20]  va[19:14]  vb[13:8]  msk[7]  sv[6]  mw[5:4]  uns[3]  aux[2:0]
//   msk : 0 = execute under mask flag vf0, 1 = under vf1 (".1" suffix)
//   sv  : operand b is the scalar operand that travels with the instruction
//   mw  : memory element width 0 byte, 1 halfword, 2 word
//   uns : unsigned compare / zero-extending load
//   Memory instructions: vd is the data register, va[5:3] the vbase index,
//   va[2:0] the vinc index, aux the vstride index, vb the index-vector
//   register (indexed forms) and vb[0] the post-increment enable (other forms).
//   vins/vext: vb is the element number. vext.vv (VEXTV): vd[i] = va[i + k],
//   k = scalar operand. vmstc/vmcts: vd is the control
//   register number. Flag operands use the low 3 bits of vd/va/vb.
package svp_pkg;

  // Table 1, V8F column
  localparam int unsigned NLANE_D      = 8;
  localparam int unsigned MVL_D        = 32;
  localparam int unsigned VPW_D        = 32;
  localparam int unsigned MEMMINW_D    = 8;
  localparam int unsigned MULTW_D      = 16;
  localparam int unsigned MACL_D       = 2;
  localparam int unsigned LMEMN_D      = 256;
  localparam int unsigned LMEMW_D      = 32;
  localparam bit          LMEMSHARE_D  = 1'b0;

  localparam int unsigned NVREG        = 64;   // the ISA defines 64 vector registers
  localparam int unsigned NVFLAG       = 8;    // flag registers per element (own choice)
  localparam int unsigned NVBASE       = 8;    // vbase/vinc/vstride registers each (own choice)
  localparam int unsigned MEMW         = 128;  // memory interface width in bits
  localparam int unsigned MEMBYTES     = MEMW / 8;
  localparam int unsigned MEM_LINES_D  = 4096; // 64 KB on-chip data memory
  localparam int unsigned ST_PER_CYC   = 4;    // store elements aligned per cycle
  localparam int unsigned MACW         = 40;   // accumulator width (own choice)

  typedef enum logic [5:0] {
    VADD = 6'd0,  VSUB = 6'd1,  VMUL = 6'd2,  VAND = 6'd3,  VOR  = 6'd4,
    VXOR = 6'd5,  VSLL = 6'd6,  VSRL = 6'd7,  VSRA = 6'd8,  VROT = 6'd9,
    VABSDIFF = 6'd10, VMIN = 6'd11, VMAX = 6'd12, VMOV = 6'd13,
    VCMPEQ = 6'd16, VCMPLT = 6'd17, VCMPLE = 6'd18,
    VFAND = 6'd20, VFOR = 6'd21, VFXOR = 6'd22, VFNOT = 6'd23, VFMOV = 6'd24,
    VFSET = 6'd25, VFCLR = 6'd26,
    VMAC = 6'd28, VCCZACC = 6'd29,
    VLDL = 6'd30, VSTL = 6'd31,
    VESHIFT = 6'd32, VINS = 6'd33, VEXT = 6'd34, VEXTV = 6'd35,
    VMSTC = 6'd36, VMCTS = 6'd37,
    VLD = 6'd40, VLDS = 6'd41, VLDX = 6'd42,
    VST = 6'd44, VSTS = 6'd45, VSTX = 6'd46,
    VLDWB = 6'd63  // internal: load-buffer to register-file write-back slot
  } vop_e;

  typedef struct packed {
    vop_e       op;
    logic [5:0] vd;
    logic [5:0] va;
    logic [5:0] vb;
    logic       msk;
    logic       sv;
    logic [1:0] mw;
    logic       uns;
    logic [2:0] aux;
  } vinstr_t;

  // control register numbers used by vmstc / vmcts
  localparam logic [5:0] CR_VL      = 6'd0;
  localparam logic [5:0] CR_VBASE   = 6'd8;
  localparam logic [5:0] CR_VINC    = 6'd16;
  localparam logic [5:0] CR_VSTRIDE = 6'd24;

  // AM_BYPASS: no memory access, elements go through the vector-op bypass
  typedef enum logic [1:0] { AM_UNIT = 2'd0, AM_STRIDE = 2'd1, AM_INDEX = 2'd2, AM_BYPASS = 2'd3 } amode_e;

  // command from the vector controller to the memory unit
  typedef struct packed {
    logic        store;
    amode_e      amode;
    logic [1:0]  mw;
    logic        uns;
    logic [31:0] base;
    logic [31:0] stride;   // in elements (constant-stride mode); k for AM_BYPASS
    logic [31:0] vl;
  } memcmd_t;

  function automatic bit is_mem(vop_e op);
    return op inside {VLD, VLDS, VLDX, VST, VSTS, VSTX};
  endfunction

  function automatic bit is_flagop(vop_e op);
    return op inside {VFAND, VFOR, VFXOR, VFNOT, VFMOV, VFSET, VFCLR};
  endfunction

  function automatic vinstr_t mk(vop_e op, int vd, int va, int vb,
                                 bit msk = 0, bit sv = 0, int mw = 2,
                                 bit uns = 0, int aux = 0);
    vinstr_t i;
    i.op = op; i.vd = 6'(vd); i.va = 6'(va); i.vb = 6'(vb); i.msk = msk;
    i.sv = sv; i.mw = 2'(mw); i.uns = uns; i.aux = 3'(aux);
    return i;
  endfunction

endpackage
