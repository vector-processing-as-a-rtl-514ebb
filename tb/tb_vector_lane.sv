// tb_vector_lane: one lane (lane 1 of 4, MVL 16, four slots) driven through
// its R and X stage inputs as the controller would. Checks register writes
// from the ALU under vector length and mask, compare-to-flag, vins,
// the shift-chain input, load-buffer write-back, store-buffer contents,
// local-memory write and lookup (one extra cycle), and the MAC-chain input.
module tb_vector_lane;
  import svp_pkg::*;
  localparam int NL = 4, MV = 16, E = MV / NL, ID = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] r_reg_a, r_reg_b;
  logic [1:0] r_slot, x_slot;
  logic x_valid, chain_en, x_en, ld_push, st_pop, st_mask, st_empty;
  vinstr_t x_ins;
  logic [4:0] x_vl;
  logic [31:0] x_scalar, shift_in, chain_in, x_a, x_b, ld_data, st_data, st_off;

  vector_lane #(.LANE_ID(ID), .NLANE(NL), .MVL(MV), .VPW(32), .MULTW(16), .LMEMN(256),
                .LMEMW(32), .LMEMSHARE(1'b0)) dut (.*);

  logic [31:0] m [NVREG][E];

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s %h exp %h", w, g, e); end
  endtask

  // issue all slots of one instruction through R and X
  task automatic run(vinstr_t i, logic [31:0] sc, int vl, logic [31:0] shv[E] = '{default: 0});
    for (int c = 0; c <= E; c++) begin
      @(negedge clk);
      r_reg_a = (i.op inside {VST, VSTS, VSTX}) ? i.vd : i.va;
      r_reg_b = i.vb;
      r_slot  = 2'(c);
      x_valid = (c > 0);
      x_ins = i; x_slot = 2'(c - 1); x_vl = 5'(vl); x_scalar = sc;
      shift_in = (c > 0) ? shv[c - 1] : 0;
    end
    @(negedge clk);
    x_valid = 0;
    @(negedge clk);
  endtask

  task automatic verify(int r, string w);
    for (int s = 0; s < E; s++) begin
      @(negedge clk); r_reg_a = 6'(r); r_slot = 2'(s);
      @(negedge clk); chk($sformatf("%s v%0d[%0d]", w, r, s), x_a, m[r][s]);
    end
  endtask

  initial begin
    logic [31:0] shv [E];
    r_reg_a = 0; r_reg_b = 0; r_slot = 0; x_slot = 0; x_valid = 0; x_ins = '0; x_vl = 0;
    x_scalar = 0; shift_in = 0; chain_en = 0; chain_in = 0; ld_push = 0; ld_data = 0; st_pop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // set v1, v2 element by element with vins (element = slot*NL + ID)
    for (int s = 0; s < E; s++) begin
      m[1][s] = $urandom; m[2][s] = $urandom % 100;
      run(mk(VINS, 1, 0, s * NL + ID), m[1][s], MV);
      run(mk(VINS, 2, 0, s * NL + ID), m[2][s], MV);
      run(mk(VINS, 2, 0, s * NL + ID + 1), 32'hDEAD, MV);   // other lane's element: ignored
    end
    verify(1, "vins"); verify(2, "vins");
    // v3 = v1 + v2 at full length, then v3 = v1 - v2 with VL = 10 (slots 0..2 hold 1,5,9)
    run(mk(VADD, 3, 1, 2), 0, MV);
    for (int s = 0; s < E; s++) m[3][s] = m[1][s] + m[2][s];
    verify(3, "vadd");
    run(mk(VSUB, 3, 1, 2), 0, 9);
    for (int s = 0; s < E; s++) if (s * NL + ID < 9) m[3][s] = m[1][s] - m[2][s];
    verify(3, "vsub VL=9");
    // scalar operand: v4 = v2 & scalar
    run(mk(VAND, 4, 2, 0, 0, 1), 32'h0F, MV);
    for (int s = 0; s < E; s++) m[4][s] = m[2][s] & 32'h0F;
    verify(4, "vand.vs");
    // vf1 = v2 < 50 (scalar); v5 = v1 under mask vf1, else unchanged (v5 = 7 first)
    run(mk(VMOV, 5, 0, 0, 0, 1), 7, MV);
    run(mk(VCMPLT, 1, 2, 0, 0, 1), 50, MV);
    run(mk(VMOV, 5, 0, 1, 1), 0, MV);
    for (int s = 0; s < E; s++) m[5][s] = (m[2][s] < 50) ? m[1][s] : 7;
    verify(5, "masked vmov");
    // shift chain input
    for (int s = 0; s < E; s++) shv[s] = $urandom;
    run(mk(VESHIFT, 6, 1, 0), 0, MV, shv);
    for (int s = 0; s < E; s++) m[6][s] = shv[s];
    verify(6, "veshift");
    // load buffer write-back
    for (int s = 0; s < E; s++) begin
      @(negedge clk); ld_push = 1; ld_data = 32'h100 + s; m[7][s] = 32'h100 + s;
    end
    @(negedge clk); ld_push = 0;
    run(mk(VLDWB, 7, 0, 0), 0, MV);
    verify(7, "load write-back");
    // store buffer: data of v1, offsets of v2, mask vf1
    run(mk(VSTX, 1, 0, 2, 1), 0, MV);
    for (int s = 0; s < E; s++) begin
      @(negedge clk);
      checks++;
      if (st_empty || st_data !== m[1][s] || st_off !== m[2][s] || st_mask !== (m[2][s] < 50)) begin
        failures++; $display("FAIL store buffer slot %0d", s);
      end
      st_pop = 1;
      @(negedge clk); st_pop = 0;
    end
    chk("store buffer drained", 32'(st_empty), 1);
    // local memory: lmem[v4] = v2 (split per slot), then v8 = lmem[v4]
    run(mk(VSTL, 0, 4, 2), 0, MV);
    run(mk(VLDL, 8, 4, 0), 0, MV);
    for (int s = 0; s < E; s++) m[8][s] = m[2][s];
    verify(8, "local memory");
    // MAC chain result into slot 0
    chain_en = 1; chain_in = 32'h12345678;
    run(mk(VCCZACC, 9, 0, 0), 0, MV);
    @(negedge clk); r_reg_a = 9; r_slot = 0;
    @(negedge clk); chk("vcczacc slot 0", x_a, 32'h12345678);
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
