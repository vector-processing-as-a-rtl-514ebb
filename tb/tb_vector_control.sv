// tb_vector_control: the controller with a modelled memory unit and lanes.
// Checks that an instruction occupies ceil(VL/NLANE) consecutive X slots and
// the next follows without a gap, vmstc/vmcts through the control
// registers, memory commands (base, stride, width, post-increment), that a
// memory instruction waits while the memory unit is busy, the load sequence
// (command, wait for done, write-back slots), the vldl bubble and vext.
module tb_vector_control;
  import svp_pkg::*;
  localparam int NL = 8, MV = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic q_valid, q_pop, r_room, r_push, x_valid, m_cmd_valid, m_busy, m_done, idle;
  vinstr_t q_ins, x_ins;
  logic [31:0] q_scalar, r_data, x_scalar;
  logic [5:0] r_reg_a, r_reg_b, x_vl;
  logic [1:0] r_slot, x_slot;
  logic [NL-1:0][31:0] lane_xa;
  memcmd_t m_cmd;

  vector_control #(.NLANE(NL), .MVL(MV), .VPW(32)) dut (.*);

  // instruction queue model
  vinstr_t iq[$];
  logic [31:0] sq[$];
  assign q_valid  = iq.size() > 0;
  assign q_ins    = q_valid ? iq[0] : '0;
  assign q_scalar = q_valid ? sq[0] : 0;
  always @(posedge clk) if (q_pop) begin void'(iq.pop_front()); void'(sq.pop_front()); end

  // logs
  typedef struct { int t; vop_e op; int slot; } ev_t;
  ev_t xs[$];
  logic [31:0] res[$];
  memcmd_t cmds[$];
  int cmd_t[$];
  always @(posedge clk) if (rst_n) begin
    if (x_valid) xs.push_back('{cyc, x_ins.op, int'(x_slot)});
    if (r_push) res.push_back(r_data);
    if (m_cmd_valid) begin cmds.push_back(m_cmd); cmd_t.push_back(cyc); end
  end
  always_comb for (int l = 0; l < NL; l++) lane_xa[l] = 32'(x_slot) * 100 + 32'(l);

  task automatic chk(string w, int g, int e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s %0d exp %0d", w, g, e); end
  endtask
  task automatic put(vinstr_t i, logic [31:0] s = 0); iq.push_back(i); sq.push_back(s); endtask
  task automatic drain(); while (iq.size() > 0 || !idle) @(negedge clk); repeat (2) @(negedge clk); endtask

  int td;
  initial begin
    r_room = 1; m_busy = 0; m_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // VL = 20 -> 3 slots; two back-to-back arithmetic instructions
    put(mk(VMSTC, CR_VL, 0, 0), 20);
    put(mk(VMCTS, CR_VL, 0, 0));
    put(mk(VADD, 1, 2, 3));
    put(mk(VSUB, 4, 5, 6));
    drain();
    chk("vmcts VL", res.pop_front(), 20);
    chk("x slots", xs.size(), 6);
    for (int k = 0; k < 6; k++) begin
      chk("slot order", xs[k].slot, k % 3);
      chk("no gap", xs[k].t, xs[0].t + k);
      chk("op", xs[k].op, (k < 3) ? VADD : VSUB);
    end
    xs.delete();
    // memory command fields and post-increment
    put(mk(VMSTC, CR_VBASE + 2, 0, 0), 32'h1000);
    put(mk(VMSTC, CR_VINC + 5, 0, 0), 32'h40);
    put(mk(VMSTC, CR_VSTRIDE + 3, 0, 0), 7);
    put(mk(VLDS, 9, 2 * 8 + 5, 1, 0, 0, 1, 1, 3));   // base 2, inc 5, stride 3, post-inc
    put(mk(VMCTS, CR_VBASE + 2, 0, 0));
    repeat (6) @(negedge clk);
    chk("one command", cmds.size(), 1);
    chk("cmd base", cmds[0].base, 32'h1000);
    chk("cmd stride", cmds[0].stride, 7);
    chk("cmd mode", cmds[0].amode, AM_STRIDE);
    chk("cmd width", cmds[0].mw, 1);
    chk("cmd vl", cmds[0].vl, 20);
    chk("no write-back before done", xs.size(), 0);
    m_done = 1; td = cyc; @(negedge clk); m_done = 0;
    drain();
    chk("load write-back slots", xs.size(), 3);
    for (int k = 0; k < 3; k++) chk("write-back op", xs[k].op, VLDWB);
    // done seen in cycle td; write-back R from td+1, X slots td+2 .. td+4
    chk("load write-back timing", xs[2].t - td, 4);
    chk("post-increment", res.pop_front(), 32'h1040);
    xs.delete(); cmds.delete(); cmd_t.delete();
    // a store waits while the memory unit is busy
    m_busy = 1;
    put(mk(VST, 9, 0, 0));
    repeat (10) @(negedge clk);
    chk("store held", cmds.size(), 0);
    m_busy = 0;
    drain();
    chk("store issued", cmds.size(), 1);
    chk("store slots", xs.size(), 3);
    xs.delete();
    // vldl: 3 slots then one idle cycle before the next instruction
    put(mk(VLDL, 1, 2, 0));
    put(mk(VADD, 1, 1, 1));
    drain();
    chk("vldl+vadd slots", xs.size(), 6);
    chk("vldl bubble", xs[3].t - xs[2].t, 2);
    xs.delete();
    // load overlap: an independent instruction runs while the load is
    // pending; a dependent one and a vmstc wait for the write-back
    put(mk(VLD, 9, 0, 0));
    put(mk(VADD, 1, 2, 3));                  // independent
    put(mk(VADD, 4, 9, 3));                  // reads the load's register
    repeat (10) @(negedge clk);
    chk("independent slots during load", xs.size(), 3);
    for (int k = 0; k < xs.size(); k++) chk("independent op", xs[k].op, VADD);
    chk("dependent held", iq.size(), 1);
    m_done = 1; @(negedge clk); m_done = 0;
    drain();
    chk("write-back then dependent", xs.size(), 9);
    for (int k = 3; k < 6; k++) chk("write-back after overlap", xs[k].op, VLDWB);
    for (int k = 6; k < 9; k++) chk("dependent after write-back", xs[k].op, VADD);
    xs.delete(); cmds.delete();
    put(mk(VLD, 9, 0, 0));
    put(mk(VMSTC, CR_VL, 0, 0), 8);          // VL change waits for the write-back
    repeat (6) @(negedge clk);
    chk("vmstc held behind load", iq.size(), 1);
    m_done = 1; @(negedge clk); m_done = 0;
    drain();
    chk("write-back used the old VL", xs.size(), 3);
    xs.delete(); cmds.delete();
    put(mk(VMSTC, CR_VL, 0, 0), 20);
    drain();
    // vext element 13 = lane 5, slot 1
    put(mk(VEXT, 0, 4, 13));
    drain();
    chk("vext", res.pop_front(), 105);
    chk("results consumed", res.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
