// vector_control: instruction decode and sequencing for the vector unit.
//
// Takes vector instructions, each with the scalar operand sent along with it
// by the scalar core, from the instruction queue and drives the lanes, the
// memory unit and the control registers (vctrl_regs, instantiated here).
// A vector instruction is executed as ceil(VL/NLANE) slot operations, one
// per cycle, all lanes working on slot s in the same cycle. The lane
// pipeline is R (register read) then X (execute and write back); the
// register file forwards a write to a read of the same word, so the next
// instruction issues on the cycle after the previous one's last slot.
// Cycle counts (from acceptance to acceptance of the next instruction):
//   arithmetic, flag, shift, MAC, vins/vext     : ceil(VL/NLANE)
//   vldl (local-memory load)                    : ceil(VL/NLANE) + 1
//   vmstc / vmcts                               : 1
//   store (data copied to the store buffers)    : ceil(VL/NLANE); the memory
//                                                  unit then drains on its own
//   load, unit/strided                          : 1 (command); the write-back
//                                                  follows later, see below
//   load, indexed                               : ceil(VL/NLANE) (offsets)
//   vext.vv (through the memory-unit bypass)     : MVL/NLANE (source slots)
// Loads overlap with later instructions. Once a load (or vext.vv) has been
// handed to the memory unit, the controller goes on with the following
// instructions while the memory unit fills the lanes' load buffers. When
// the memory unit reports the last element, the controller inserts
// ceil(VL/NLANE) write-back slots (VLDWB) at the next instruction boundary.
// Until then an instruction is held if it names the load's destination
// register in any field, writes flags (the write-back's mask), changes VL
// (the write-back's length) or uses the memory unit. A dependent instruction
// therefore sees 2 + lines read + ceil(VL/NLANE) cycles after a unit-stride
// load, the published cycle model. The overlap rules are this design's own.
// Memory instructions wait until the memory unit is idle, so scalar and
// vector memory accesses stay in program order. vmcts and vext results go to
// the result queue, and wait for room in it.
// The memory command carries VL in a 32-bit field shared with the memory
// unit; since VL never exceeds MVL its upper bits are always zero.
module vector_control
  import svp_pkg::*;
#(
  parameter int unsigned NLANE = NLANE_D,
  parameter int unsigned MVL   = MVL_D,
  parameter int unsigned VPW   = VPW_D,
  localparam int unsigned SW   = $clog2(MVL / NLANE),
  localparam int unsigned LW   = $clog2(NLANE),
  localparam int unsigned VLW  = $clog2(MVL + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // instruction queue head
  input  logic                       q_valid,
  input  vinstr_t                    q_ins,
  input  logic [31:0]                q_scalar,
  output logic                       q_pop,
  // result queue
  input  logic                       r_room,
  output logic                       r_push,
  output logic [31:0]                r_data,
  // lanes: R stage
  output logic [5:0]                 r_reg_a,
  output logic [5:0]                 r_reg_b,
  output logic [SW-1:0]              r_slot,
  // lanes: X stage
  output logic                       x_valid,
  output vinstr_t                    x_ins,
  output logic [SW-1:0]              x_slot,
  output logic [VLW-1:0]             x_vl,
  output logic [VPW-1:0]             x_scalar,
  input  logic [NLANE-1:0][VPW-1:0]  lane_xa,
  // memory unit
  output logic                       m_cmd_valid,
  output memcmd_t                    m_cmd,
  input  logic                       m_busy,
  input  logic                       m_done,
  output logic                       idle
);
  typedef enum logic [2:0] { P_IDLE, P_SLOTS, P_LDWB, P_BUBBLE } phase_e;

  phase_e      phase;
  vinstr_t     cur;
  logic [31:0] cur_scalar;
  logic [SW:0] slot, nslots;

  // control registers
  logic [VLW-1:0]               vl;
  logic [NVBASE-1:0][31:0]      vbase, vinc, vstride;
  logic                         cr_we, inc_en;
  logic [31:0]                  cr_rdata;

  vctrl_regs #(.MVL(MVL)) u_cregs (
    .clk, .rst_n, .we(cr_we), .waddr(q_ins.vd), .wdata(q_scalar),
    .raddr(q_ins.vd), .rdata(cr_rdata),
    .inc_en, .base_idx(q_ins.va[5:3]), .inc_idx(q_ins.va[2:0]),
    .vl, .vbase, .vinc, .vstride);

  function automatic logic [SW:0] slots_for(logic [VLW-1:0] n);
    logic [VLW:0] t;
    t = ({1'b0, n} + (VLW+1)'(NLANE - 1)) >> LW;
    return (t == 0) ? (SW+1)'(1) : (SW+1)'(t);
  endfunction

  logic    start, issue, q_is_mem, q_is_store, q_ok;
  // pending load: issued to the memory unit, not yet written back
  logic    ld_pend, ld_done, wb_go, q_is_ld, q_conflict;
  vinstr_t ld_ins;
  vinstr_t iss;
  logic [SW:0]  iss_slot;
  logic [31:0]  iss_scalar;

  assign q_is_mem   = is_mem(q_ins.op);
  assign q_is_store = q_ins.op inside {VST, VSTS, VSTX};
  assign q_is_ld    = q_ins.op inside {VLD, VLDS, VLDX, VEXTV};

  // An instruction may not pass a pending load if it names the load's
  // destination register in any field, uses the memory unit, changes VL
  // (the write-back uses it) or writes flags (the write-back's mask).
  assign q_conflict = (q_ins.vd == ld_ins.vd) || (q_ins.va == ld_ins.vd) ||
                      (q_ins.vb == ld_ins.vd) || q_is_mem || q_ins.op == VEXTV ||
                      q_ins.op == VMSTC || is_flagop(q_ins.op) ||
                      (q_ins.op inside {VCMPEQ, VCMPLT, VCMPLE});
  // write-back of a finished load goes in at the next instruction boundary
  assign wb_go = (phase == P_IDLE) && ld_pend && (ld_done || m_done);

  always_comb begin
    q_ok = 1'b1;
    if ((q_is_mem || q_ins.op == VEXTV) && m_busy) q_ok = 1'b0;
    if ((q_ins.op == VEXT || q_ins.op == VMCTS) && !r_room) q_ok = 1'b0;
    if (ld_pend && q_conflict) q_ok = 1'b0;
    // a vext still writing its result owns the result-queue port this cycle
    if (q_ins.op == VMCTS && x_valid && x_ins.op == VEXT) q_ok = 1'b0;
  end

  assign start = (phase == P_IDLE) && q_valid && q_ok && !wb_go;
  assign q_pop = start;

  // what the R stage does this cycle
  always_comb begin
    issue      = 1'b0;
    iss        = cur;
    iss_slot   = slot;
    iss_scalar = cur_scalar;
    if (phase == P_SLOTS) begin
      issue = 1'b1;
    end else if (phase == P_LDWB) begin
      issue  = 1'b1;
      iss.op = VLDWB;
    end else if (start && !(q_ins.op inside {VMSTC, VMCTS, VLD, VLDS})) begin
      issue      = 1'b1;
      iss        = q_ins;
      iss_slot   = '0;
      iss_scalar = q_scalar;
    end
  end

  assign r_reg_a = (iss.op inside {VST, VSTS, VSTX}) ? iss.vd : iss.va;
  assign r_reg_b = iss.vb;
  assign r_slot  = iss_slot[SW-1:0];

  // memory command and control-register side effects at acceptance
  always_comb begin
    m_cmd_valid  = start && (q_is_mem || q_ins.op == VEXTV);
    m_cmd.store  = q_is_store;
    m_cmd.amode  = (q_ins.op inside {VLD, VST})  ? AM_UNIT :
                   (q_ins.op inside {VLDS, VSTS}) ? AM_STRIDE :
                   (q_ins.op == VEXTV)            ? AM_BYPASS : AM_INDEX;
    m_cmd.mw     = q_ins.mw;
    m_cmd.uns    = q_ins.uns;
    m_cmd.base   = vbase[q_ins.va[5:3]];
    m_cmd.stride = (q_ins.op == VEXTV) ? q_scalar : vstride[q_ins.aux];
    m_cmd.vl     = 32'(vl);
    inc_en       = m_cmd_valid && q_is_mem && (m_cmd.amode != AM_INDEX) && q_ins.vb[0];
    cr_we        = start && (q_ins.op == VMSTC);
  end

  // result queue: vmcts at acceptance, vext at its X slot
  logic [LW-1:0] ext_lane;
  logic [SW-1:0] ext_slot;
  assign ext_lane = x_ins.vb[LW-1:0];
  assign ext_slot = SW'(x_ins.vb >> LW);

  always_comb begin
    r_push = 1'b0;
    r_data = cr_rdata;
    if (x_valid && x_ins.op == VEXT && x_slot == ext_slot) begin
      r_push = 1'b1;
      r_data = 32'(lane_xa[ext_lane]);
    end else if (start && q_ins.op == VMCTS) begin
      r_push = 1'b1;
    end
  end

  assign idle = (phase == P_IDLE) && !x_valid && !m_busy && !q_valid && !ld_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= P_IDLE;
      cur        <= '0;
      cur_scalar <= '0;
      slot       <= '0;
      nslots     <= '0;
      x_valid    <= 1'b0;
      x_ins      <= '0;
      x_slot     <= '0;
      x_vl       <= '0;
      x_scalar   <= '0;
      ld_pend    <= 1'b0;
      ld_done    <= 1'b0;
      ld_ins     <= '0;
    end else begin
      if (m_done && ld_pend) ld_done <= 1'b1;
      if (start && q_is_ld) begin
        ld_pend <= 1'b1;
        ld_done <= 1'b0;
        ld_ins  <= q_ins;
      end

      // X stage register
      x_valid  <= issue;
      x_ins    <= iss;
      x_slot   <= iss_slot[SW-1:0];
      x_vl     <= (iss.op == VEXTV) ? VLW'(MVL) : vl;   // vext.vv sends every source element
      x_scalar <= VPW'(iss_scalar);

      unique case (phase)
        P_IDLE: if (wb_go) begin
          cur    <= ld_ins;
          phase  <= P_LDWB;
          slot   <= '0;
          nslots <= slots_for(vl);
        end else if (start) begin
          cur        <= q_ins;
          cur_scalar <= q_scalar;
          nslots     <= (q_ins.op == VEXTV) ? slots_for(VLW'(MVL)) : slots_for(vl);
          slot       <= 1;
          case (q_ins.op)
            VMSTC, VMCTS: phase <= P_IDLE;
            VLD, VLDS:    phase <= P_IDLE;
            default: begin
              if (((q_ins.op == VEXTV) ? slots_for(VLW'(MVL)) : slots_for(vl)) > 1) phase <= P_SLOTS;
              else if (q_ins.op == VLDL) phase <= P_BUBBLE;
              else phase <= P_IDLE;
            end
          endcase
        end
        P_SLOTS: begin
          slot <= slot + 1'b1;
          if (slot == nslots - 1'b1) begin
            if (cur.op == VLDL) phase <= P_BUBBLE;
            else                     phase <= P_IDLE;
          end
        end
        P_LDWB: begin
          slot <= slot + 1'b1;
          if (slot == nslots - 1'b1) begin
            phase   <= P_IDLE;
            ld_pend <= 1'b0;
            ld_done <= 1'b0;
          end
        end
        P_BUBBLE: phase <= P_IDLE;
        default:  phase <= P_IDLE;
      endcase
    end
  end

  a_push_room: assert property (@(posedge clk) disable iff (!rst_n)
                                (start && q_is_mem) |-> !m_busy);

endmodule
