// tb_vctrl_regs: reset values, writes and reads of VL (clamped to MVL),
// vbase, vinc and vstride, and base post-increment.
module tb_vctrl_regs;
  import svp_pkg::*;
  localparam int MV = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we, inc_en;
  logic [5:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [2:0] base_idx, inc_idx;
  logic [5:0] vl;
  logic [NVBASE-1:0][31:0] vbase, vinc, vstride;
  logic [31:0] m [64];

  vctrl_regs #(.MVL(MV)) dut (.*);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s %h exp %h", w, g, e); end
  endtask

  initial begin
    we = 0; inc_en = 0; waddr = 0; raddr = 0; wdata = 0; base_idx = 0; inc_idx = 0;
    foreach (m[i]) m[i] = 0;
    m[0] = MV;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      raddr = 6'($urandom);
      #1;
      chk("read", rdata, (raddr == 0 || raddr[5:3] inside {1, 2, 3}) ? m[raddr] : 0);
      chk("vl", 32'(vl), m[0]);
      we = 1'($urandom); waddr = ($urandom % 2) ? 6'($urandom % 32) : 6'(0);
      wdata = ($urandom % 2) ? $urandom % 40 : $urandom;
      inc_en = 1'($urandom); base_idx = 3'($urandom); inc_idx = 3'($urandom);
      @(posedge clk); #1;
      if (inc_en) m[8 + base_idx] = m[8 + base_idx] + m[16 + inc_idx];
      if (we) begin
        if (waddr == 0) m[0] = (wdata > MV) ? MV : wdata;
        else if (waddr[5:3] inside {1, 2, 3}) m[waddr] = wdata;
      end
      we = 0; inc_en = 0;
    end
    for (int i = 0; i < NVBASE; i++) begin
      chk("vbase", vbase[i], m[8 + i]); chk("vinc", vinc[i], m[16 + i]); chk("vstride", vstride[i], m[24 + i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
