// soft_vector_processor: the vector co-processor of a soft-core CPU system.
//
// A scalar core (not part of this RTL) fetches a mixed stream of scalar and
// vector instructions and forwards each vector instruction, with the value
// of its scalar operand, into the vector instruction queue. The vector unit
// executes the instructions in order on NLANE lanes that share one control
// path. Element e of a vector register lives in lane e mod NLANE, so a
// full-length instruction occupies MVL/NLANE cycles. Results for the scalar
// core (vext, vmcts) come back through the result queue. The scalar core
// also reaches main memory through the memory unit (word port `s_*`).
//
// Contents:
//   instruction queue / result queue  : sync_fifo, scalar <-> vector FIFOs
//   vector_control                    : decode, slot sequencing, control regs
//   NLANE x vector_lane               : register file and flag partitions,
//                                       ALU, load/store buffers, local memory
//   NLANE/4 x mac_unit                : distributed MACs in cascade chains of
//                                       MACL units (none when MACL = 0)
//   shift chain                       : lane l receives lane l-1's element;
//                                       lane 0 receives the last lane's
//                                       element from the previous slot
//   mem_unit + mem_align_xbar         : vector/scalar memory access
//   vec_op_bypass (in mem_unit)       : lane-to-lane path for vext.vv
//   main_mem                          : 128-bit on-chip SRAM main memory
// Handshakes: vi_valid/vi_ready push one instruction (a queue slot is free
// when vi_ready is high); vr_valid/vr_pop read one result (first word fall
// through). `idle` is high when every queue is empty and nothing is running.
module soft_vector_processor
  import svp_pkg::*;
#(
  parameter int unsigned NLANE     = NLANE_D,
  parameter int unsigned MVL       = MVL_D,
  parameter int unsigned VPW       = VPW_D,
  parameter int unsigned MEMMINW   = MEMMINW_D,
  parameter int unsigned MULTW     = MULTW_D,
  parameter int unsigned MACL      = MACL_D,
  parameter int unsigned LMEMN     = LMEMN_D,
  parameter int unsigned LMEMW     = LMEMW_D,
  parameter bit          LMEMSHARE = LMEMSHARE_D,
  parameter int unsigned MEM_LINES = MEM_LINES_D,
  parameter int unsigned IQ_DEPTH  = 8,
  parameter int unsigned RQ_DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // vector instruction queue (from the scalar core)
  input  logic        vi_valid,
  output logic        vi_ready,
  input  vinstr_t     vi_instr,
  input  logic [31:0] vi_scalar,
  // result queue (to the scalar core)
  output logic        vr_valid,
  input  logic        vr_pop,
  output logic [31:0] vr_data,
  // scalar core data-memory port
  input  logic        s_req,
  input  logic        s_we,
  input  logic [31:0] s_addr,
  input  logic [31:0] s_wdata,
  output logic        s_ack,
  output logic [31:0] s_rdata,
  output logic        idle
);
  localparam int unsigned ELEMS = MVL / NLANE;
  localparam int unsigned SW    = $clog2(ELEMS);
  localparam int unsigned VLW   = $clog2(MVL + 1);
  localparam int unsigned NMAC  = (MACL == 0) ? 0 : NLANE / 4;
  localparam int unsigned NCH   = (MACL == 0) ? 0 : NMAC / MACL;
  localparam int unsigned LAW   = $clog2(MEM_LINES);

  // ------------------------------------------------------------ queues
  logic        iq_full, iq_empty, iq_pop;
  logic [63:0] iq_head;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_cnt;
  logic        rq_full, rq_empty, rq_push;
  logic [31:0] rq_wdata;
  logic [$clog2(RQ_DEPTH+1)-1:0] rq_cnt;

  sync_fifo #(.W(64), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .push(vi_valid && !iq_full), .wdata({vi_instr, vi_scalar}),
    .pop(iq_pop), .rdata(iq_head), .full(iq_full), .empty(iq_empty), .count(iq_cnt));
  assign vi_ready = !iq_full;

  sync_fifo #(.W(32), .DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n, .push(rq_push), .wdata(rq_wdata), .pop(vr_pop), .rdata(vr_data),
    .full(rq_full), .empty(rq_empty), .count(rq_cnt));
  assign vr_valid = !rq_empty;

  // ------------------------------------------------------------ control
  logic [5:0]    r_reg_a, r_reg_b;
  logic [SW-1:0] r_slot, x_slot;
  logic          x_valid;
  vinstr_t       x_ins;
  logic [VLW-1:0] x_vl;
  logic [VPW-1:0] x_scalar;
  logic [NLANE-1:0][VPW-1:0] xa, xb;
  logic [NLANE-1:0]          xen;
  logic          m_cmd_valid, m_busy, m_done, c_idle;
  memcmd_t       m_cmd;

  vector_control #(.NLANE(NLANE), .MVL(MVL), .VPW(VPW)) u_ctrl (
    .clk, .rst_n,
    .q_valid(!iq_empty), .q_ins(vinstr_t'(iq_head[63:32])), .q_scalar(iq_head[31:0]), .q_pop(iq_pop),
    .r_room(32'(rq_cnt) + 2 <= 32'(RQ_DEPTH)), .r_push(rq_push), .r_data(rq_wdata),
    .r_reg_a, .r_reg_b, .r_slot,
    .x_valid, .x_ins, .x_slot, .x_vl, .x_scalar, .lane_xa(xa),
    .m_cmd_valid, .m_cmd, .m_busy, .m_done, .idle(c_idle));

  assign idle = c_idle && rq_empty;

  // ------------------------------------------------------------ shift chain
  logic [VPW-1:0] shift_carry;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shift_carry <= '0;
    else if (x_valid) shift_carry <= xa[NLANE-1];
  end

  // ------------------------------------------------------------ MAC chains
  logic [NLANE-1:0][VPW-1:0] chain_res;
  logic [NLANE-1:0]          chain_en;
  logic mac_acc, mac_zero;
  assign mac_acc  = x_valid && (x_ins.op == VMAC);
  assign mac_zero = x_valid && (x_ins.op == VCCZACC) && (x_slot == '0);

  if (NMAC > 0) begin : g_mac
    logic [NMAC-1:0][MACW-1:0] cas_out;
    for (genvar m = 0; m < NMAC; m++) begin : g_unit
      logic [3:0][VPW-1:0] mb;
      for (genvar i = 0; i < 4; i++) begin : g_b
        assign mb[i] = x_ins.sv ? x_scalar : xb[4*m+i];
      end
      mac_unit #(.VPW(VPW), .MULTW(MULTW), .ACCW(MACW)) u_mac (
        .clk, .rst_n, .acc_en(mac_acc), .zero(mac_zero), .en(xen[4*m +: 4]),
        .a(xa[4*m +: 4]), .b(mb),
        .cas_in((m % MACL == 0) ? '0 : cas_out[(m == 0) ? 0 : m-1]),
        .cas_out(cas_out[m]));
    end
    for (genvar l = 0; l < NLANE; l++) begin : g_res
      if (l < NCH) begin : g_ch
        assign chain_en[l]  = 1'b1;
        assign chain_res[l] = VPW'(cas_out[l*MACL + MACL - 1]);
      end else begin : g_nch
        assign chain_en[l]  = 1'b0;
        assign chain_res[l] = '0;
      end
    end
  end else begin : g_no_mac
    assign chain_en  = '0;
    assign chain_res = '0;
  end

  // ------------------------------------------------------------ lanes
  logic [NLANE-1:0]          ld_push, st_pop, st_mask, st_empty;
  logic [NLANE-1:0][VPW-1:0] ld_data, st_data, st_off;

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    logic [VPW-1:0] sh_in;
    if (l == 0) begin : g_first
      assign sh_in = (x_slot == '0) ? '0 : shift_carry;
    end else begin : g_next
      assign sh_in = xa[l-1];
    end
    vector_lane #(.LANE_ID(l), .NLANE(NLANE), .MVL(MVL), .VPW(VPW), .MULTW(MULTW),
                  .LMEMN(LMEMN), .LMEMW(LMEMW), .LMEMSHARE(LMEMSHARE)) u_lane (
      .clk, .rst_n, .r_reg_a, .r_reg_b, .r_slot,
      .x_valid, .x_ins, .x_slot, .x_vl, .x_scalar,
      .shift_in(sh_in), .chain_en(chain_en[l]), .chain_in(chain_res[l]),
      .x_a(xa[l]), .x_b(xb[l]), .x_en(xen[l]),
      .ld_push(ld_push[l]), .ld_data(ld_data[l]),
      .st_pop(st_pop[l]), .st_data(st_data[l]), .st_off(st_off[l]),
      .st_mask(st_mask[l]), .st_empty(st_empty[l]));
  end

  // ------------------------------------------------------------ memory
  logic                 mm_req, mm_we;
  logic [LAW-1:0]       mm_addr;
  logic [MEMBYTES-1:0]  mm_be;
  logic [MEMW-1:0]      mm_wdata, mm_rdata;

  mem_unit #(.NLANE(NLANE), .VPW(VPW), .MEMMINW(MEMMINW), .LINES(MEM_LINES), .MVL(MVL)) u_mu (
    .clk, .rst_n, .cmd_valid(m_cmd_valid), .cmd(m_cmd), .busy(m_busy), .done(m_done),
    .ld_push, .ld_data, .st_pop, .st_data, .st_off, .st_mask, .st_empty,
    .s_req, .s_we, .s_addr, .s_wdata, .s_ack, .s_rdata,
    .m_req(mm_req), .m_we(mm_we), .m_addr(mm_addr), .m_be(mm_be),
    .m_wdata(mm_wdata), .m_rdata(mm_rdata));

  main_mem #(.LINES(MEM_LINES)) u_mem (
    .clk, .req(mm_req), .we(mm_we), .addr(mm_addr), .be(mm_be),
    .wdata(mm_wdata), .rdata(mm_rdata));

endmodule
