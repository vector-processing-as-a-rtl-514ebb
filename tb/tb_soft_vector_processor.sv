// tb_soft_vector_processor: end-to-end test of the vector co-processor at
// its default (V8F) configuration.
//
// The testbench plays the scalar core: it preloads main memory through the
// scalar memory port, sends vector instructions with their scalar operands
// into the instruction queue, reads results from the result queue and reads
// memory back. Expected values are computed here from the input data. It
// exercises unit-stride, strided and indexed loads and stores, byte and word
// widths, masked (conditional) stores, compares and flag logic, the MAC
// chain (vmac / vcczacc), the shift chain (veshift), vins / vext, local
// memory broadcast writes and table lookups, vector extract through the
// memory unit's bypass, base post-increment, stores
// draining while arithmetic runs, loads filling while independent arithmetic
// runs (and a dependent instruction held until the write-back), and instruction-queue back-pressure. It
// also checks the cycle counts of arithmetic, store and load instructions
// against the cycle model ceil(VL/NLANE) and 2 + ceil(VL/min(NLANE,128/w))
// + ceil(VL/NLANE).
module tb_soft_vector_processor;
  import svp_pkg::*;

  localparam int NL  = NLANE_D;
  localparam int MV  = MVL_D;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        vi_valid, vi_ready, vr_valid, vr_pop, s_req, s_we, s_ack, idle;
  vinstr_t     vi_instr;
  logic [31:0] vi_scalar, vr_data, s_addr, s_wdata, s_rdata;

  soft_vector_processor dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_unit_ld, n_str_ld, n_idx_ld, n_unit_st, n_str_st, n_idx_st, n_masked_st;
  int n_extract, n_mac, n_cczacc, n_shift, n_lmem_ld, n_lmem_bc, n_overlap, n_backpressure, n_bypass;
  int n_ld_overlap, n_ld_stall;

  // record the cycle of every instruction acceptance
  int pop_t[$];
  always @(posedge clk) if (rst_n && dut.iq_pop) pop_t.push_back(cyc);

  always @(posedge clk) if (rst_n) begin
    if (dut.m_busy && dut.x_valid && !(dut.x_ins.op inside {VST, VSTS, VSTX, VLDX, VLDWB})) n_overlap++;
    if (vi_valid && !vi_ready) n_backpressure++;
    // an instruction other than the load itself executing while a load is pending
    if (dut.u_ctrl.ld_pend && dut.x_valid && !(dut.x_ins.op inside {VLDX, VEXTV, VLDWB})) n_ld_overlap++;
    // an instruction held back because it depends on the pending load
    if (dut.u_ctrl.ld_pend && dut.u_ctrl.q_valid && dut.u_ctrl.q_conflict && dut.u_ctrl.phase == 0) n_ld_stall++;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send(vinstr_t i, logic [31:0] sc = 0);
    @(negedge clk);
    vi_valid = 1; vi_instr = i; vi_scalar = sc;
    @(posedge clk);
    while (!vi_ready) @(posedge clk);
    @(negedge clk);
    vi_valid = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (!idle && n < 5000) begin @(negedge clk); n++; end
  endtask

  task automatic swrite(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    s_req = 1; s_we = 1; s_addr = a; s_wdata = d;
    @(posedge clk);
    while (!s_ack) @(posedge clk);
    @(negedge clk);
    s_req = 0; s_we = 0;
  endtask

  task automatic sread(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_req = 1; s_we = 0; s_addr = a;
    @(posedge clk);
    @(posedge clk);
    while (!s_ack) @(posedge clk);
    d = s_rdata;
    @(negedge clk);
    s_req = 0;
  endtask

  task automatic getres(output logic [31:0] d);
    int n = 0;
    @(negedge clk);
    while (!vr_valid && n < 2000) begin @(negedge clk); n++; end
    d = vr_data;
    vr_pop = 1;
    @(negedge clk);
    vr_pop = 0;
  endtask

  // convenience encoders
  function automatic vinstr_t mstc(int cr); return mk(VMSTC, cr, 0, 0); endfunction
  // memory: data reg, base index, inc index, post-increment, width, stride index / index reg
  function automatic vinstr_t mem(vop_e op, int vd, int bi, int w, int vb = 0, int si = 0,
                                   bit msk = 0, bit uns = 0, int ii = 0);
    return mk(op, vd, bi * 8 + ii, vb, msk, 0, w, uns, si);
  endfunction

  logic [31:0] A [MV], B [MV], IDX [MV], T [256];
  logic [31:0] d;

  initial begin
    vi_valid = 0; vi_instr = '0; vi_scalar = 0; vr_pop = 0; s_req = 0; s_we = 0;
    s_addr = 0; s_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------------------------------------------------------- data
    for (int i = 0; i < MV; i++) begin
      A[i] = $urandom();
      B[i] = $urandom();
      IDX[i] = 32'((($urandom() % 64) * 4));
      swrite(32'h1000 + 4 * i, A[i]);
      swrite(32'h2000 + 4 * i, B[i]);
      swrite(32'h3000 + 4 * i, IDX[i]);
    end
    for (int i = 0; i < 256; i++) swrite(32'h4000 + 4 * i, 32'(i * 7 + 1));
    for (int i = 0; i < 256; i++) T[i] = $urandom();
    for (int i = 0; i < 8; i++) begin
      swrite(32'h6000 + 4 * i, 0);
      swrite(32'h6100 + 4 * i, 0);
      swrite(32'h6200 + 4 * i, 0);
    end

    // ---------------------------------------------------------------- unit loads, ALU, unit store
    send(mstc(CR_VBASE + 0), 32'h1000);
    send(mstc(CR_VBASE + 1), 32'h2000);
    send(mstc(CR_VBASE + 2), 32'h5000);
    wait_idle();
    pop_t.delete();
    send(mem(VLD, 1, 0, 2));                  // v1 = A
    send(mem(VLD, 2, 1, 2));                  // v2 = B
    send(mk(VADD, 3, 1, 2));                  // v3 = A + B
    send(mk(VXOR, 4, 3, 1));                  // v4 = v3 ^ A  (depends on previous)
    send(mk(VABSDIFF, 5, 1, 2));
    send(mk(VMUL, 6, 1, 2));
    send(mem(VST, 3, 2, 2));                  // store v3 at 0x5000
    send(mk(VSUB, 7, 1, 2));                  // runs while the store drains
    send(mk(VMIN, 8, 1, 2, 0, 0, 2, 1));      // unsigned min
    send(mstc(CR_VBASE + 3), 32'h5100);
    wait_idle();
    n_unit_ld += 2; n_unit_st++;
    // cycle model: load = 2 + 32/4 + 32/8 = 14; ALU = 4; store = 4
    check("vld cycles", 32'(pop_t[1] - pop_t[0]), 32'(2 + MV / 4 + MV / NL));
    check("vadd cycles", 32'(pop_t[3] - pop_t[2]), 32'(MV / NL));
    check("dependent vxor cycles", 32'(pop_t[4] - pop_t[3]), 32'(MV / NL));
    check("vst cycles", 32'(pop_t[7] - pop_t[6]), 32'(MV / NL));
    n_bypass++;
    send(mem(VST, 4, 3, 2));
    send(mstc(CR_VBASE + 3), 32'h5200);
    send(mem(VST, 5, 3, 2));
    send(mstc(CR_VBASE + 3), 32'h5300);
    send(mem(VST, 6, 3, 2));
    send(mstc(CR_VBASE + 3), 32'h5400);
    send(mem(VST, 7, 3, 2));
    send(mstc(CR_VBASE + 3), 32'h5500);
    send(mem(VST, 8, 3, 2));
    wait_idle();
    n_unit_st += 5;
    for (int i = 0; i < MV; i++) begin
      logic signed [31:0] p;
      p = 32'($signed(A[i][15:0]) * $signed(B[i][15:0]));
      sread(32'h5000 + 4 * i, d); check("vadd", d, A[i] + B[i]);
      sread(32'h5100 + 4 * i, d); check("vxor", d, (A[i] + B[i]) ^ A[i]);
      sread(32'h5200 + 4 * i, d);
      check("vabsdiff", d, ($signed(A[i]) < $signed(B[i])) ? B[i] - A[i] : A[i] - B[i]);
      sread(32'h5300 + 4 * i, d); check("vmul", d, p);
      sread(32'h5400 + 4 * i, d); check("vsub", d, A[i] - B[i]);
      sread(32'h5500 + 4 * i, d); check("vminu", d, (A[i] < B[i]) ? A[i] : B[i]);
    end

    // ---------------------------------------------------------------- compare, flags, masked byte store
    // bytes 0x2000.. compared signed against bytes 0x1000..; store where a<b
    send(mstc(CR_VL), 20);
    send(mstc(CR_VBASE + 4), 32'h6000);
    send(mem(VLD, 10, 0, 0));                 // v10 = sign-extended bytes of A
    send(mem(VLD, 11, 1, 0));                 // v11 = bytes of B
    send(mk(VCMPLT, 1, 10, 11));              // vf1 = v10 < v11
    send(mk(VFNOT, 2, 1, 0));                 // vf2 = ~vf1
    send(mk(VFAND, 3, 1, 2));                 // vf3 = vf1 & vf2 = 0
    send(mem(VST, 10, 4, 0, 0, 0, 1));        // .1: store bytes where vf1
    send(mstc(CR_VBASE + 4), 32'h6100);
    send(mk(VFMOV, 1, 2, 0));                 // vf1 = vf2
    send(mem(VST, 11, 4, 0, 0, 0, 1));        // store the other bytes
    send(mstc(CR_VBASE + 4), 32'h6200);
    send(mk(VFMOV, 1, 3, 0));                 // vf1 = 0 : store nothing
    send(mem(VST, 11, 4, 0, 0, 0, 1));
    wait_idle();
    n_unit_ld += 2; n_masked_st += 3;
    for (int w = 0; w < 6; w++) begin
      logic [31:0] d0, d1, d2, exp0, exp1;
      sread(32'h6000 + 4 * w, d0);
      sread(32'h6100 + 4 * w, d1);
      sread(32'h6200 + 4 * w, d2);
      exp0 = 0; exp1 = 0;
      for (int bi = 0; bi < 4; bi++) begin
        int el; logic [7:0] ab, bb;
        el = 4 * w + bi;
        ab = A[el / 4][8 * (el % 4) +: 8];
        bb = B[el / 4][8 * (el % 4) +: 8];
        if (el < 20) begin
          if ($signed(ab) < $signed(bb)) exp0[8 * bi +: 8] = ab;
          else                           exp1[8 * bi +: 8] = bb;
        end
      end
      check("masked store vf1", d0, exp0);
      check("masked store ~vf1", d1, exp1);
      check("masked store none", d2, 0);
    end
    send(mk(VFSET, 1, 0, 0));                 // restore vf1

    // ---------------------------------------------------------------- strided / indexed, post-increment
    send(mstc(CR_VL), MV);
    send(mstc(CR_VSTRIDE + 3), 3);
    send(mstc(CR_VBASE + 5), 32'h4000);
    send(mstc(CR_VINC + 1), 32'h40);
    send(mem(VLDS, 12, 5, 2, 1, 3, 0, 0, 1)); // v12 = M[0x4000 + 12*i], then vbase5 += 0x40
    send(mk(VMCTS, CR_VBASE + 5, 0, 0));
    send(mem(VLD, 13, 0, 2));                 // reload A into v13 (sanity)
    send(mstc(CR_VBASE + 6), 32'h3000);
    send(mem(VLD, 14, 6, 2));                 // v14 = byte offsets
    send(mstc(CR_VBASE + 6), 32'h4000);
    send(mem(VLDX, 15, 6, 2, 14));            // v15 = M[0x4000 + v14[i]]
    send(mstc(CR_VBASE + 7), 32'h7000);
    send(mem(VSTS, 12, 7, 2, 0, 3));          // strided store, stride 3 words
    send(mstc(CR_VBASE + 7), 32'h8000);
    send(mem(VSTX, 15, 7, 2, 14));            // indexed store
    wait_idle();
    n_str_ld++; n_idx_ld++; n_str_st++; n_idx_st++;
    getres(d); check("post-increment", d, 32'h4040);
    for (int i = 0; i < MV; i++) begin
      sread(32'h7000 + 12 * i, d); check("strided ld/st", d, 32'((3 * i) * 7 + 1));
      sread(32'h8000 + IDX[i], d); check("indexed ld/st", d, 32'((IDX[i] / 4) * 7 + 1));
    end

    // ---------------------------------------------------------------- MAC chain, shift chain, vins/vext
    send(mk(VMAC, 0, 1, 2));                  // acc += A[i]*B[i] (16-bit)
    send(mk(VCCZACC, 20, 0, 0));              // v20[0] = chain sum, zero
    send(mk(VEXT, 0, 20, 0));
    send(mk(VMAC, 0, 1, 1));                  // second round after zeroing
    send(mk(VCCZACC, 21, 0, 0));
    send(mk(VEXT, 0, 21, 0));
    send(mk(VESHIFT, 22, 1, 0));              // v22[i] = A[i-1], v22[0] = 0
    send(mk(VINS, 22, 0, 0), 32'hCAFE0001);   // v22[0] = scalar
    send(mk(VEXT, 0, 22, 0));
    send(mk(VEXT, 0, 22, 9));
    send(mk(VEXT, 0, 22, 8));
    send(mk(VEXT, 0, 22, 31));
    n_mac += 2; n_cczacc += 2; n_shift++;
    begin
      logic [MACW-1:0] s1, s2;
      s1 = 0; s2 = 0;
      for (int i = 0; i < MV; i++) begin
        s1 += MACW'($signed(A[i][15:0]) * $signed(B[i][15:0]));
        s2 += MACW'($signed(A[i][15:0]) * $signed(A[i][15:0]));
      end
      getres(d); check("vmac+vcczacc", d, s1[31:0]);
      getres(d); check("vmac after zero", d, s2[31:0]);
    end
    getres(d); check("vins", d, 32'hCAFE0001);
    getres(d); check("veshift lane", d, A[8]);
    getres(d); check("veshift wrap", d, A[7]);
    getres(d); check("veshift last", d, A[30]);

    // ---------------------------------------------------------------- vector-op bypass (vext.vv)
    send(mk(VEXTV, 23, 1, 0), 5);             // v23[i] = A[i+5], 0 past the end
    send(mstc(CR_VL), 10);
    send(mk(VEXTV, 24, 1, 0), 3);             // v24[i] = A[i+3], i < 10
    send(mstc(CR_VL), MV);
    send(mstc(CR_VBASE + 7), 32'hB000);
    send(mem(VST, 23, 7, 2));
    send(mstc(CR_VBASE + 7), 32'hB100);
    send(mem(VST, 24, 7, 2));
    wait_idle();
    n_extract += 2;
    for (int i = 0; i < MV; i++) begin
      sread(32'hB000 + 4 * i, d); check("vext.vv k=5", d, (i + 5 < MV) ? A[i + 5] : 0);
      if (i < 10) begin sread(32'hB100 + 4 * i, d); check("vext.vv k=3 VL=10", d, A[i + 3]); end
    end

    // ---------------------------------------------------------------- local memory
    // broadcast a 256-word table T (the size of an AES lookup table) into
    // every element's local memory: address vector = k everywhere
    for (int k = 0; k < 256; k++) begin
      send(mk(VMOV, 30, 0, 0, 0, 1), k);      // v30 = k (scalar broadcast move)
      send(mk(VSTL, 0, 30, 0, 0, 1), T[k]);   // lmem[v30] = T[k] in all lanes
    end
    n_lmem_bc += 256;
    send(mk(VAND, 31, 14, 0, 0, 1), 32'hFF);  // v31 = (IDX) & 255 : table index
    wait_idle();
    pop_t.delete();
    send(mk(VLDL, 16, 31, 0));                // v16 = T[v31]
    send(mk(VADD, 17, 16, 0, 0, 1), 1);       // dependent on the lookup
    send(mstc(CR_VBASE + 7), 32'h9000);
    send(mem(VST, 17, 7, 2));
    wait_idle();
    n_lmem_ld++;
    check("vldl cycles", 32'(pop_t[1] - pop_t[0]), 32'(MV / NL + 1));
    for (int i = 0; i < MV; i++) begin
      sread(32'h9000 + 4 * i, d); check("local memory lookup", d, T[IDX[i] & 255] + 1);
    end

    // ---------------------------------------------------------------- load overlapped with arithmetic
    send(mstc(CR_VL), MV);
    send(mstc(CR_VBASE + 1), 32'h2000);
    wait_idle();
    pop_t.delete();
    send(mem(VLD, 50, 1, 2));                 // v50 = B
    send(mk(VMOV, 51, 0, 0, 0, 1), 5);        // independent: runs during the load
    send(mk(VADD, 52, 51, 51));               // independent: v52 = 10
    send(mk(VADD, 53, 50, 52));               // depends on v50: waits for write-back
    send(mstc(CR_VBASE + 7), 32'hA100);
    send(mem(VST, 53, 7, 2));
    send(mem(VST, 52, 7, 2));                 // vbase7 unchanged: overwritten below
    wait_idle();
    // (the testbench supplies one instruction every two cycles)
    check("independent instruction accepted during the load", 32'(pop_t[1] - pop_t[0] <= 2), 1);
    check("dependent instruction not before the load's write-back", 32'(pop_t[3] - pop_t[0] >= 2 + MV / 4 + MV / NL), 1);
    for (int i = 0; i < MV; i++) begin
      sread(32'hA100 + 4 * i, d); check("independent result during load", d, 32'd10);
    end
    send(mem(VST, 53, 7, 2));
    wait_idle();
    for (int i = 0; i < MV; i++) begin
      sread(32'hA100 + 4 * i, d); check("load + overlapped result", d, B[i] + 10);
    end

    // ---------------------------------------------------------------- queue back-pressure
    for (int k = 0; k < 24; k++) send(mk(VADD, 40, 40, 1));
    send(mstc(CR_VBASE + 7), 32'hA000);
    send(mem(VST, 40, 7, 2));
    wait_idle();
    send(mk(VMOV, 40, 0, 0, 0, 1), 0);
    for (int k = 0; k < 24; k++) send(mk(VADD, 40, 40, 1));
    send(mem(VST, 40, 7, 2));
    wait_idle();
    for (int i = 0; i < MV; i++) begin
      sread(32'hA000 + 4 * i, d); check("queued vadd chain", d, 32'(24) * A[i]);
    end

    // ---------------------------------------------------------------- mechanism coverage
    check("unit loads seen", 32'(n_unit_ld > 0), 1);
    check("strided loads seen", 32'(n_str_ld > 0), 1);
    check("indexed loads seen", 32'(n_idx_ld > 0), 1);
    check("unit stores seen", 32'(n_unit_st > 0), 1);
    check("strided stores seen", 32'(n_str_st > 0), 1);
    check("indexed stores seen", 32'(n_idx_st > 0), 1);
    check("masked stores seen", 32'(n_masked_st > 0), 1);
    check("MAC seen", 32'(n_mac > 0 && n_cczacc > 0), 1);
    check("shift chain seen", 32'(n_shift > 0), 1);
    check("vector-op bypass seen", 32'(n_extract > 0), 1);
    check("local memory seen", 32'(n_lmem_ld > 0 && n_lmem_bc > 0), 1);
    check("store drain overlapped", 32'(n_overlap > 0), 1);
    check("queue back-pressure", 32'(n_backpressure > 0), 1);
    check("load overlapped with arithmetic", 32'(n_ld_overlap > 0), 1);
    check("dependent instruction held behind a load", 32'(n_ld_stall > 0), 1);
    $display("mechanisms: unit_ld=%0d str_ld=%0d idx_ld=%0d unit_st=%0d str_st=%0d idx_st=%0d masked_st=%0d mac=%0d cczacc=%0d shift=%0d lmem_ld=%0d lmem_bc=%0d overlap_cycles=%0d backpressure_cycles=%0d rf_forward=%0d extract=%0d ld_overlap_cycles=%0d ld_stall_cycles=%0d",
             n_unit_ld, n_str_ld, n_idx_ld, n_unit_st, n_str_st, n_idx_st, n_masked_st,
             n_mac, n_cczacc, n_shift, n_lmem_ld, n_lmem_bc, n_overlap, n_backpressure, n_bypass, n_extract, n_ld_overlap, n_ld_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
