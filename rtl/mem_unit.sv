// mem_unit: the vector memory unit (address generation and data movement).
//
// Accepts one command at a time from the vector controller and moves data
// between main memory (128-bit lines, one-cycle read latency) and the lanes'
// load and store buffers through the alignment crossbar. Scalar-core word
// accesses are served when no vector command is in progress.
//
// Loads, unit stride or constant stride: each cycle one line is read and,
// the next cycle, every element of the access that lies in that line is
// pushed to its lane's load buffer, up to min(NLANE, 128/width) elements per
// cycle. `done` pulses in the cycle the last element is pushed, so an aligned
// load of VL elements takes ceil(VL / min(NLANE, 128/width)) reads plus one
// cycle of latency.
// Loads, indexed: one element per cycle; the byte offset comes from the head
// of the element's lane store buffer (pushed there by the controller from
// the index register), address = base + offset.
// Stores: up to ST_PER_CYC (4) consecutive elements that lie in one line are
// written per cycle with byte enables; an element whose mask bit is clear
// is skipped. Indexed stores write one element per cycle. A store never
// waits on the controller: it drains the buffers while later non-memory
// instructions run; `busy` stays high until the last element is written.
// Strides are in elements, offsets and addresses in bytes.
// Bypass (vext.vv): no memory access; the source register's elements, all
// MVL of them, pass from the store buffers through vec_op_bypass into the
// load buffers, up to NLANE per cycle, shifted down by k elements
// (cmd.stride); destination elements whose source would lie beyond MVL are
// filled with 0 (ZFILL). `done` then pulses as for a load.
module mem_unit
  import svp_pkg::*;
#(
  parameter int unsigned NLANE   = NLANE_D,
  parameter int unsigned VPW     = VPW_D,
  parameter int unsigned MEMMINW = MEMMINW_D,
  parameter int unsigned LINES   = MEM_LINES_D,
  parameter int unsigned MVL     = MVL_D,
  localparam int unsigned LAW    = $clog2(LINES)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // command from the vector controller
  input  logic                       cmd_valid,
  input  memcmd_t                    cmd,
  output logic                       busy,
  output logic                       done,
  // lanes
  output logic [NLANE-1:0]           ld_push,
  output logic [NLANE-1:0][VPW-1:0]  ld_data,
  output logic [NLANE-1:0]           st_pop,
  input  logic [NLANE-1:0][VPW-1:0]  st_data,
  input  logic [NLANE-1:0][VPW-1:0]  st_off,
  input  logic [NLANE-1:0]           st_mask,
  input  logic [NLANE-1:0]           st_empty,
  // scalar core port (32-bit words)
  input  logic                       s_req,
  input  logic                       s_we,
  input  logic [31:0]                s_addr,
  input  logic [31:0]                s_wdata,
  output logic                       s_ack,
  output logic [31:0]                s_rdata,
  // main memory
  output logic                       m_req,
  output logic                       m_we,
  output logic [LAW-1:0]             m_addr,
  output logic [MEMBYTES-1:0]        m_be,
  output logic [MEMW-1:0]            m_wdata,
  input  logic [MEMW-1:0]            m_rdata
);
  localparam int unsigned LW = $clog2(NLANE);

  typedef enum logic [2:0] { IDLE, LOAD, STORE, SREAD, BYP, ZFILL } state_e;
  state_e  st;
  memcmd_t c;
  logic [31:0] e;        // next element index
  logic [31:0] ea;       // byte address of element e (unit / strided)
  logic [31:0] sb;       // byte stride

  // ---------------------------------------------------------------- address generation
  logic [NLANE:0][31:0] addr_j;
  logic [31:0]          kmax, k;
  logic [1:0]           mw_eff;
  localparam logic [1:0] MINMW = (MEMMINW >= 32) ? 2'd2 : (MEMMINW >= 16) ? 2'd1 : 2'd0;
  assign mw_eff = (c.mw < MINMW) ? MINMW : c.mw;

  always_comb begin
    for (int j = 0; j <= NLANE; j++) addr_j[j] = ea + 32'(j) * sb;
  end

  // number of elements, starting at e, that share addr_j[0]'s line
  always_comb begin
    logic stop;
    kmax = (c.store ? 32'(ST_PER_CYC) : 32'(NLANE));
    if (!c.store && (32'(MEMBYTES) >> mw_eff) < kmax) kmax = 32'(MEMBYTES) >> mw_eff;
    if (c.amode == AM_INDEX) kmax = 1;
    k    = 0;
    stop = 1'b0;
    for (int j = 0; j < NLANE; j++) begin
      if (!stop && 32'(j) < kmax && (e + 32'(j)) < c.vl &&
          addr_j[j][31:4] == addr_j[0][31:4] &&
          (!c.store || !st_empty[LW'(e + 32'(j))])) k = 32'(j + 1);
      else stop = 1'b1;
    end
  end

  // indexed: element e's offset sits at the head of lane e mod NLANE's store buffer
  logic [LW-1:0] ix_lane;
  logic [31:0]   ix_addr;
  assign ix_lane = LW'(e);
  assign ix_addr = c.base + 32'(st_off[ix_lane]);

  // ---------------------------------------------------------------- load return stage
  logic [31:0]                  bp_cnt;   // vector-op bypass (declared early: used below)
  logic [NLANE-1:0]             bp_pop, bp_push;
  logic [NLANE-1:0][VPW-1:0]    bp_data;
  logic [31:0]                  zf_lo;    // first destination element with no source
  logic                         p_valid, p_last;
  logic [LW-1:0]                p_e0;
  logic [31:0]                  p_k;
  logic [NLANE-1:0][3:0]        p_boff;   // byte offset per element slot j
  logic [3:0]                   p_sboff;
  logic [NLANE-1:0][3:0]        lane_boff;
  logic [NLANE-1:0][VPW-1:0]    xb_ld;
  logic [ST_PER_CYC-1:0]        xs_valid;
  logic [ST_PER_CYC-1:0][3:0]   xs_boff;
  logic [ST_PER_CYC-1:0][VPW-1:0] xs_data;
  logic [MEMW-1:0]              xs_line;
  logic [MEMBYTES-1:0]          xs_be;
  logic [LW-1:0]                jl [NLANE];

  always_comb begin
    for (int l = 0; l < NLANE; l++) begin
      jl[l]        = LW'(l) - p_e0;               // element slot j of lane l
      lane_boff[l] = p_boff[jl[l]];
      ld_push[l]   = p_valid && (32'(jl[l]) < p_k);
    end
    ld_data = xb_ld;
    if (st == BYP) begin
      ld_push = bp_push;
      ld_data = bp_data;
    end else if (st == ZFILL) begin
      // destination elements e .. e+NLANE-1 below vl have no source: 0
      for (int l = 0; l < NLANE; l++) begin
        ld_push[l] = (e + 32'(LW'(LW'(l) - LW'(e))) < c.vl);
        ld_data[l] = '0;
      end
    end
  end

  mem_align_xbar #(.NLANE(NLANE), .VPW(VPW), .MEMMINW(MEMMINW)) u_xbar (
    .mw(c.mw), .uns(c.uns), .ld_line(m_rdata), .ld_boff(lane_boff), .ld_data(xb_ld),
    .st_valid(xs_valid), .st_boff(xs_boff), .st_data(xs_data), .st_line(xs_line), .st_be(xs_be));

  // store group
  always_comb begin
    for (int j = 0; j < ST_PER_CYC; j++) begin
      logic [LW-1:0] ln;
      ln          = LW'(e + 32'(j));
      xs_valid[j] = (32'(j) < k) && st_mask[ln];
      xs_boff[j]  = (c.amode == AM_INDEX) ? ix_addr[3:0] : addr_j[j][3:0];
      xs_data[j]  = st_data[ln];
    end
  end

  // ---------------------------------------------------------------- vector-op bypass
  vec_op_bypass #(.NLANE(NLANE), .VPW(VPW), .MVL(MVL)) u_bypass (
    .e, .k(c.stride), .vl(c.vl), .st_data, .st_empty,
    .cnt(bp_cnt), .pop(bp_pop), .push(bp_push), .push_data(bp_data));

  assign zf_lo = (c.stride >= 32'(MVL)) ? 32'd0 : 32'(MVL) - c.stride;

  // ---------------------------------------------------------------- control
  assign busy = (st != IDLE) || p_valid;

  always_comb begin
    m_req   = 1'b0;
    m_we    = 1'b0;
    m_addr  = ea[4 +: LAW];
    m_be    = '0;
    m_wdata = xs_line;
    st_pop  = '0;
    s_ack   = 1'b0;
    s_rdata = 32'(m_rdata >> (32 * p_sboff[3:2]));
    done    = p_valid && p_last;
    unique case (st)
      IDLE: begin
        if (!cmd_valid && s_req) begin
          m_req   = 1'b1;
          m_we    = s_we;
          m_addr  = s_addr[4 +: LAW];
          m_be    = 16'hF << (4 * s_addr[3:2]);
          m_wdata = {4{s_wdata}};
          s_ack   = s_we;
        end
      end
      SREAD: s_ack = 1'b1;
      BYP:   st_pop = bp_pop;
      LOAD: begin
        if (c.amode == AM_INDEX) begin
          if (e < c.vl && !st_empty[ix_lane]) begin
            m_req          = 1'b1;
            m_addr         = ix_addr[4 +: LAW];
            st_pop[ix_lane] = 1'b1;
          end
        end else if (e < c.vl) begin
          m_req = 1'b1;
        end
      end
      STORE: begin
        if (k != 0) begin
          m_req  = 1'b1;
          m_we   = 1'b1;
          m_be   = xs_be;
          if (c.amode == AM_INDEX) m_addr = ix_addr[4 +: LAW];
          for (int j = 0; j < ST_PER_CYC; j++)
            if (32'(j) < k) st_pop[LW'(e + 32'(j))] = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= IDLE;
      c        <= '0;
      e        <= '0;
      ea       <= '0;
      sb       <= '0;
      p_valid  <= 1'b0;
      p_last   <= 1'b0;
      p_e0     <= '0;
      p_k      <= '0;
      p_boff   <= '0;
      p_sboff  <= '0;
    end else begin
      p_valid <= 1'b0;
      p_last  <= 1'b0;
      unique case (st)
        IDLE: begin
          if (cmd_valid) begin
            c  <= cmd;
            e  <= '0;
            ea <= cmd.base;
            sb <= ((cmd.amode == AM_UNIT) ? 32'd1 : cmd.stride) << cmd.mw;
            if (cmd.amode == AM_BYPASS) begin
              st <= BYP;
            end else if (cmd.vl == 0 && !cmd.store) begin
              // nothing to move: report completion next cycle
              p_valid <= 1'b1;
              p_last  <= 1'b1;
              p_k     <= '0;
            end else begin
              st <= cmd.store ? STORE : LOAD;
            end
          end else if (s_req && !s_we) begin
            st      <= SREAD;
            p_sboff <= s_addr[3:0];
          end
        end
        SREAD: st <= IDLE;
        LOAD: begin
          if (c.amode == AM_INDEX) begin
            if (e < c.vl && !st_empty[ix_lane]) begin
              p_valid   <= 1'b1;
              p_e0      <= LW'(e);
              p_k       <= 32'd1;
              p_boff[0] <= ix_addr[3:0];
              p_last    <= (e + 1 >= c.vl);
              e         <= e + 1;
              if (e + 1 >= c.vl) st <= IDLE;
            end
          end else begin
            p_valid <= 1'b1;
            p_e0    <= LW'(e);
            p_k     <= k;
            for (int j = 0; j < NLANE; j++) p_boff[j] <= addr_j[j][3:0];
            p_last  <= (e + k >= c.vl);
            e       <= e + k;
            ea      <= addr_j[k[LW:0]];
            if (e + k >= c.vl) st <= IDLE;
          end
        end
        STORE: begin
          if (e >= c.vl) st <= IDLE;
          else if (k != 0) begin
            e  <= e + k;
            ea <= addr_j[k[LW:0]];
            if (e + k >= c.vl) st <= IDLE;
          end
        end
        BYP: begin
          e <= e + bp_cnt;
          if (e + bp_cnt >= 32'(MVL)) begin
            if (zf_lo < c.vl) begin
              st <= ZFILL;
              e  <= zf_lo;
            end else begin
              st      <= IDLE;
              p_valid <= 1'b1;   // signals done next cycle
              p_last  <= 1'b1;
              p_k     <= '0;
            end
          end
        end
        ZFILL: begin
          e <= e + 32'(NLANE);
          if (e + 32'(NLANE) >= c.vl) begin
            st      <= IDLE;
            p_valid <= 1'b1;
            p_last  <= 1'b1;
            p_k     <= '0;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> st == IDLE);

endmodule
