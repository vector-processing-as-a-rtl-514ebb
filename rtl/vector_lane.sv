// vector_lane: one lane of the vector unit.
//
// A lane holds a partition of the vector register file (vrf_bank) and of the
// flag registers (vflag_file), a complete copy of the functional units
// (vlane_alu), a load-store unit made of a load buffer and a store buffer
// (FIFOs of ELEMS entries) and, when LMEMN > 0, a local memory. All lanes get
// the same control; lane LANE_ID handles elements LANE_ID, LANE_ID+NLANE, ...
// (slot s holds element s*NLANE+LANE_ID).
//
// Pipeline, driven by the vector controller:
//   R  (cycle t)  : register-file read of {va, slot} and {vb, slot}
//                   (for stores the data register vd is read on port a)
//   X  (cycle t+1): x_* fields describe the instruction; the ALU result,
//                   shifted element, inserted scalar, MAC-chain result or
//                   load-buffer word is written to {vd, slot}; flags are
//                   written; store data / index offsets are pushed into the
//                   store buffer; local memory is read or written.
//   L  (cycle t+2): only for vldl, the local-memory word is written back.
// An element is active when its index is below the vector length; writes
// of vector data are further gated by the selected mask flag (vf0/vf1).
// Flag instructions ignore the mask. The shift-chain input `shift_in` is the
// neighbouring lane's port-a data (vector element shift); `chain_in` is a
// MAC-chain result written by vcczacc into slot 0 of lanes with `chain_en`.
module vector_lane
  import svp_pkg::*;
#(
  parameter int unsigned LANE_ID   = 0,
  parameter int unsigned NLANE     = NLANE_D,
  parameter int unsigned MVL       = MVL_D,
  parameter int unsigned VPW       = VPW_D,
  parameter int unsigned MULTW     = MULTW_D,
  parameter int unsigned LMEMN     = LMEMN_D,
  parameter int unsigned LMEMW     = LMEMW_D,
  parameter bit          LMEMSHARE = LMEMSHARE_D,
  localparam int unsigned ELEMS    = MVL / NLANE,
  localparam int unsigned SW       = $clog2(ELEMS),
  localparam int unsigned VLW      = $clog2(MVL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // R stage
  input  logic [5:0]        r_reg_a,
  input  logic [5:0]        r_reg_b,
  input  logic [SW-1:0]     r_slot,
  // X stage
  input  logic              x_valid,
  input  vinstr_t           x_ins,
  input  logic [SW-1:0]     x_slot,
  input  logic [VLW-1:0]    x_vl,
  input  logic [VPW-1:0]    x_scalar,
  input  logic [VPW-1:0]    shift_in,
  input  logic              chain_en,
  input  logic [VPW-1:0]    chain_in,
  output logic [VPW-1:0]    x_a,
  output logic [VPW-1:0]    x_b,
  output logic              x_en,       // active and mask set
  // load buffer, written by the memory unit
  input  logic              ld_push,
  input  logic [VPW-1:0]    ld_data,
  // store buffer, read by the memory unit: {data, offset, mask}
  input  logic              st_pop,
  output logic [VPW-1:0]    st_data,
  output logic [VPW-1:0]    st_off,
  output logic              st_mask,
  output logic              st_empty
);
  localparam int unsigned RFAW = $clog2(NVREG * ELEMS);

  logic [VPW-1:0] ra, rb, bop, y, lm_q, ld_head;
  logic           fa, fb, fmask, fres;
  logic           active, en, rf_we, fl_we;
  logic [RFAW-1:0] rf_waddr;
  logic [VPW-1:0]  rf_wdata;
  logic [$clog2(MVL)-1:0] eidx;
  logic           st_push, ld_pop;
  logic           l_valid;
  logic [5:0]     l_vd;
  logic [SW-1:0]  l_slot;

  assign eidx   = {x_slot, ($clog2(NLANE))'(LANE_ID)};
  assign active = x_valid && (VLW'(eidx) < x_vl);
  assign en     = active && fmask;
  assign x_en   = en;
  assign x_a    = ra;
  assign x_b    = rb;
  assign bop    = x_ins.sv ? x_scalar : rb;

  vrf_bank #(.VPW(VPW), .ELEMS(ELEMS)) u_vrf (
    .clk, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr_a({r_reg_a, r_slot}), .raddr_b({r_reg_b, r_slot}),
    .rdata_a(ra), .rdata_b(rb));

  vflag_file #(.ELEMS(ELEMS)) u_flags (
    .clk, .rst_n, .we(fl_we), .wsel(x_ins.vd[2:0]), .slot(x_slot), .wbit(fres),
    .rsel_a(x_ins.va[2:0]), .rsel_b(x_ins.vb[2:0]), .msel(x_ins.msk),
    .ra(fa), .rb(fb), .mask(fmask));

  vlane_alu #(.VPW(VPW), .MULTW(MULTW)) u_alu (
    .op(x_ins.op), .uns(x_ins.uns), .a(ra), .b(bop), .fa, .fb, .y, .fres);

  // write-back select
  always_comb begin
    rf_we    = 1'b0;
    rf_wdata = y;
    rf_waddr = {x_ins.vd, x_slot};
    fl_we    = 1'b0;
    ld_pop   = 1'b0;
    st_push  = 1'b0;
    if (l_valid) begin
      rf_we    = 1'b1;
      rf_wdata = lm_q;
      rf_waddr = {l_vd, l_slot};
    end else if (x_valid) begin
      unique case (x_ins.op)
        VADD, VSUB, VMUL, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VROT,
        VABSDIFF, VMIN, VMAX, VMOV: rf_we = en;
        VCMPEQ, VCMPLT, VCMPLE:     fl_we = en;
        VFAND, VFOR, VFXOR, VFNOT, VFMOV, VFSET, VFCLR: fl_we = active;
        VESHIFT: begin rf_we = en; rf_wdata = shift_in; end
        VINS: begin
          rf_we    = (eidx == x_ins.vb[$clog2(MVL)-1:0]);
          rf_wdata = x_scalar;
        end
        VCCZACC: begin rf_we = chain_en && (x_slot == '0); rf_wdata = chain_in; end
        VLDWB: begin rf_we = en; rf_wdata = ld_head; ld_pop = active; end
        VST, VSTS, VSTX, VLDX, VEXTV: st_push = active;
        default: ;
      endcase
    end
  end

  // load-store unit buffers
  logic ld_full, ld_empty, st_full;
  logic [$clog2(ELEMS+1)-1:0] ld_cnt, st_cnt;

  sync_fifo #(.W(VPW), .DEPTH(ELEMS)) u_ldbuf (
    .clk, .rst_n, .push(ld_push), .wdata(ld_data), .pop(ld_pop), .rdata(ld_head),
    .full(ld_full), .empty(ld_empty), .count(ld_cnt));

  sync_fifo #(.W(2*VPW+1), .DEPTH(ELEMS)) u_stbuf (
    .clk, .rst_n, .push(st_push), .wdata({ra, rb, fmask}), .pop(st_pop),
    .rdata({st_data, st_off, st_mask}), .full(st_full), .empty(st_empty), .count(st_cnt));

  // local memory (vldl reads at X and writes back at L; vstl writes at X)
  logic lm_re, lm_we;
  assign lm_re = x_valid && (x_ins.op == VLDL) && en;
  assign lm_we = x_valid && (x_ins.op == VSTL) && en;

  if (LMEMN > 0) begin : g_lmem
    lane_local_mem #(.VPW(VPW), .ELEMS(ELEMS), .LMEMN(LMEMN), .LMEMW(LMEMW),
                     .LMEMSHARE(LMEMSHARE)) u_lmem (
      .clk, .re(lm_re), .we(lm_we), .slot(x_slot), .addr(ra), .wdata(bop), .rdata(lm_q));
  end else begin : g_no_lmem
    assign lm_q = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_valid <= 1'b0;
      l_vd    <= '0;
      l_slot  <= '0;
    end else begin
      l_valid <= lm_re;
      l_vd    <= x_ins.vd;
      l_slot  <= x_slot;
    end
  end

  a_ldbuf_has_data: assert property (@(posedge clk) disable iff (!rst_n) ld_pop |-> !ld_empty);
  a_stbuf_room:     assert property (@(posedge clk) disable iff (!rst_n) st_push |-> !st_full);

endmodule
