// tb_mem_unit: the memory unit with the on-chip memory and modelled lane
// buffers. Preloads memory through the scalar port, then runs unit-stride,
// constant-stride (including stride 0) and indexed loads at byte, halfword
// and word width and checks every element each lane receives, and the load
// rate: one memory line per cycle with min(NLANE, 128/width) elements per
// line, `done` one cycle after the last read. Then runs unit, strided,
// masked and indexed stores (four elements per cycle) and checks memory.
module tb_mem_unit;
  import svp_pkg::*;
  localparam int NL = 8, LINES = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, busy, done;
  memcmd_t cmd;
  logic [NL-1:0] ld_push, st_pop, st_mask, st_empty;
  logic [NL-1:0][31:0] ld_data, st_data, st_off;
  logic s_req, s_we, s_ack;
  logic [31:0] s_addr, s_wdata, s_rdata;
  logic m_req, m_we;
  logic [7:0] m_addr;
  logic [15:0] m_be;
  logic [127:0] m_wdata, m_rdata;

  mem_unit #(.NLANE(NL), .VPW(32), .MEMMINW(8), .LINES(LINES)) dut (.*);
  main_mem #(.LINES(LINES)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr), .be(m_be),
                                    .wdata(m_wdata), .rdata(m_rdata));

  // lane buffer models
  logic [31:0] ldq [NL][$];
  logic [64:0] stq [NL][$];
  always_comb begin
    for (int l = 0; l < NL; l++) begin
      st_empty[l] = (stq[l].size() == 0);
      {st_data[l], st_off[l], st_mask[l]} = st_empty[l] ? 65'd0 : stq[l][0];
    end
  end
  always @(posedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (ld_push[l]) ldq[l].push_back(ld_data[l]);
      if (st_pop[l]) void'(stq[l].pop_front());
    end
  end

  logic [7:0] img [4096];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s %h exp %h", w, g, e); end
  endtask

  task automatic swrite(logic [31:0] a, logic [31:0] d);
    @(negedge clk); s_req = 1; s_we = 1; s_addr = a; s_wdata = d;
    @(posedge clk); while (!s_ack) @(posedge clk);
    @(negedge clk); s_req = 0;
  endtask
  task automatic sread(logic [31:0] a, output logic [31:0] d);
    @(negedge clk); s_req = 1; s_we = 0; s_addr = a;
    @(posedge clk); @(posedge clk); while (!s_ack) @(posedge clk);
    d = s_rdata;
    @(negedge clk); s_req = 0;
  endtask

  function automatic logic [31:0] elem(logic [31:0] a, int mw, bit u);
    logic [31:0] w;
    w = {img[a + 3], img[a + 2], img[a + 1], img[a]};
    case (mw)
      0: return u ? {24'd0, w[7:0]} : {{24{w[7]}}, w[7:0]};
      1: return u ? {16'd0, w[15:0]} : {{16{w[15]}}, w[15:0]};
      default: return w;
    endcase
  endfunction

  // run a load, return cycles from command to done
  task automatic do_load(amode_e am, int mw, bit u, logic [31:0] base, int stride, int vl,
                         logic [31:0] offs[$], output int cycles);
    int t0;
    for (int l = 0; l < NL; l++) ldq[l].delete();
    if (am == AM_INDEX)
      for (int e = 0; e < vl; e++) stq[e % NL].push_back({32'd0, offs[e], 1'b1});
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{store: 0, amode: am, mw: 2'(mw), uns: u, base: base, stride: 32'(stride), vl: 32'(vl)};
    t0 = cyc;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
    for (int e = 0; e < vl; e++) begin
      logic [31:0] a;
      a = (am == AM_INDEX) ? base + offs[e] : base + 32'(e * stride * (1 << mw));
      if (ldq[e % NL].size() == 0) begin
        checks++; failures++; $display("FAIL missing element %0d", e);
      end else chk($sformatf("load elem %0d mode %0d", e, am), ldq[e % NL].pop_front(), elem(a, mw, u));
    end
    for (int l = 0; l < NL; l++) chk("no extra elements", ldq[l].size(), 0);
  endtask

  task automatic do_store(amode_e am, int mw, logic [31:0] base, int stride, int vl,
                          logic [31:0] offs[$], bit masked);
    for (int e = 0; e < vl; e++) begin
      logic [31:0] d, a;
      logic mk;
      d = $urandom; mk = masked ? 1'($urandom) : 1'b1;
      stq[e % NL].push_back({d, (am == AM_INDEX) ? offs[e] : 32'd0, mk});
      a = (am == AM_INDEX) ? base + offs[e] : base + 32'(e * stride * (1 << mw));
      if (mk) for (int k = 0; k < (1 << mw); k++) img[a + k] = d[8 * k +: 8];
    end
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{store: 1, amode: am, mw: 2'(mw), uns: 0, base: base, stride: 32'(stride), vl: 32'(vl)};
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic verify_mem(int lo, int hi);
    for (int a = lo; a < hi; a += 4) begin
      logic [31:0] d;
      sread(a, d);
      chk($sformatf("mem %h", a), d, {img[a + 3], img[a + 2], img[a + 1], img[a]});
    end
  endtask

  initial begin
    logic [31:0] offs[$];
    int c;
    cmd_valid = 0; cmd = '0; s_req = 0; s_we = 0; s_addr = 0; s_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a += 4) begin
      logic [31:0] w;
      w = $urandom;
      {img[a + 3], img[a + 2], img[a + 1], img[a]} = w;
      swrite(a, w);
    end
    // unit-stride word load, aligned: 32 elements, 4 per line -> 8 reads
    do_load(AM_UNIT, 2, 0, 32'h100, 1, 32, offs, c);
    chk("unit word load cycles", c, 8 + 1);
    // unit-stride byte load: at most NLANE = 8 elements per cycle -> 4 reads
    do_load(AM_UNIT, 0, 0, 32'h200, 1, 32, offs, c);
    chk("unit byte load cycles", c, 4 + 1);
    do_load(AM_UNIT, 0, 1, 32'h203, 1, 19, offs, c);
    do_load(AM_UNIT, 1, 0, 32'h302, 1, 32, offs, c);
    // constant stride
    do_load(AM_STRIDE, 2, 0, 32'h400, 4, 32, offs, c);
    chk("stride-4 word load cycles", c, 32 + 1);
    do_load(AM_STRIDE, 2, 0, 32'h500, 0, 32, offs, c);
    chk("stride-0 word load cycles", c, 8 + 1);
    do_load(AM_STRIDE, 0, 1, 32'h600, 3, 25, offs, c);
    // indexed: one element per cycle
    for (int e = 0; e < 32; e++) offs.push_back(32'(($urandom % 256) * 4));
    do_load(AM_INDEX, 2, 0, 32'h800, 0, 32, offs, c);
    chk("indexed load cycles", c, 32 + 1);
    // stores
    do_store(AM_UNIT, 2, 32'hA00, 1, 32, offs, 0);
    do_store(AM_UNIT, 0, 32'hB01, 1, 29, offs, 1);
    do_store(AM_STRIDE, 1, 32'hC00, 5, 32, offs, 0);
    do_store(AM_INDEX, 2, 32'h400, 0, 32, offs, 1);
    verify_mem(0, 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
