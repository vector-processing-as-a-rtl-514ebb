// tb_cfg_run: one instance of the vector co-processor at a given
// configuration, driven through a short program that touches each unit:
// unit-stride word loads, vadd, a constant-stride load, a masked store, byte
// loads (when MEMMINW = 8), vmac / vcczacc (when MACL > 0, one result per
// MAC chain), vext.vv and a local-memory lookup (when LMEMN > 0). Expected
// values are computed here. Elements are VPW bits wide (32 or 16) and are
// moved as words or halfwords accordingly. Used by tb_configs, which runs it at the other
// published lane counts and feature sets; `done` rises when the program has
// finished, with the totals in `checks` and `failures`.
module tb_cfg_run
  import svp_pkg::*;
#(
  parameter int unsigned NLANE     = 4,
  parameter int unsigned MVL       = 16,
  parameter int unsigned VPW       = 32,
  parameter int unsigned MEMMINW   = 8,
  parameter int unsigned MACL      = 1,
  parameter int unsigned LMEMN     = 256,
  parameter bit          LMEMSHARE = 1'b0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        vi_valid, vi_ready, vr_valid, vr_pop, s_req, s_we, s_ack, idle;
  vinstr_t     vi_instr;
  logic [31:0] vi_scalar, vr_data, s_addr, s_wdata, s_rdata;

  soft_vector_processor #(.NLANE(NLANE), .MVL(MVL), .VPW(VPW), .MEMMINW(MEMMINW), .MACL(MACL),
                          .LMEMN(LMEMN), .LMEMSHARE(LMEMSHARE)) dut (.*);

  localparam int NCH = (MACL == 0) ? 0 : (NLANE / 4) / MACL;
  localparam int EB  = VPW / 8;                  // bytes per element in memory
  localparam int MW  = (VPW == 16) ? 1 : 2;      // element access width code

  // elements are VPW bits wide and packed in memory (little-endian)
  task automatic put_vec(logic [31:0] base, int n, logic [31:0] v [], int stride = 1);
    for (int w = 0; w < n * EB / 4; w++) begin
      logic [31:0] word;
      if (EB == 4) word = v[w];
      else         word = {v[2 * w + 1][15:0], v[2 * w][15:0]};
      swrite(base + 4 * w, word);
    end
  endtask

  task automatic get_elem(logic [31:0] base, int i, output logic [31:0] e);
    logic [31:0] word;
    sread(base + ((i * EB) & ~32'd3), word);
    e = (EB == 4) ? word : 32'(word[16 * (i % 2) +: 16]);
  endtask

  function automatic logic [31:0] trunc(logic [31:0] x);
    return (VPW == 32) ? x : {16'd0, x[15:0]};
  endfunction


  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL [%0d lanes] %s: got %h expected %h", NLANE, what, got, exp);
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

  function automatic vinstr_t mstc(int cr); return mk(VMSTC, cr, 0, 0); endfunction
  function automatic vinstr_t mem(vop_e op, int vd, int bi, int w, int vb = 0, int si = 0,
                                   bit msk = 0, bit uns = 0, int ii = 0);
    return mk(op, vd, bi * 8 + ii, vb, msk, 0, w, uns, si);
  endfunction

  logic [31:0] A [], B [], S [], Z [], T [256];

  initial begin : prog
    logic [31:0] d;
    logic signed [39:0] sum;
    done = 0; checks = 0; failures = 0;
    vi_valid = 0; vi_instr = '0; vi_scalar = 0; vr_pop = 0; s_req = 0; s_we = 0;
    s_addr = 0; s_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    A = new[MVL]; B = new[MVL]; S = new[2 * MVL]; Z = new[MVL];
    for (int i = 0; i < MVL; i++) begin
      A[i] = trunc($urandom()); B[i] = trunc($urandom()); Z[i] = 0;
    end
    for (int i = 0; i < 2 * MVL; i++) S[i] = trunc($urandom());
    put_vec(32'h1000, MVL, A);
    put_vec(32'h1400, MVL, B);
    put_vec(32'h1800, 2 * MVL, S);
    put_vec(32'h2000, MVL, Z);

    send(mstc(CR_VL), MVL);
    send(mstc(CR_VBASE + 0), 32'h1000);
    send(mstc(CR_VBASE + 1), 32'h1400);
    send(mstc(CR_VBASE + 2), 32'h1800);
    send(mstc(CR_VBASE + 3), 32'h2000);
    send(mstc(CR_VSTRIDE + 1), 2);
    send(mem(VLD, 1, 0, MW));                    // v1 = A
    send(mem(VLD, 2, 1, MW));                    // v2 = B
    send(mk(VADD, 3, 1, 2));                     // v3 = A + B
    send(mem(VLDS, 4, 2, MW, 0, 1));             // v4 = S[2i]
    send(mk(VADD, 3, 3, 4));                     // v3 = A + B + S[2i]
    send(mk(VCMPLT, 1, 1, 2, 0, 0, 2, 1));       // vf1 = A < B (unsigned)
    send(mem(VST, 3, 3, MW, 0, 0, 1));           // masked store
    wait_idle();
    for (int i = 0; i < MVL; i++) begin
      get_elem(32'h2000, i, d);
      check("add, strided load, masked store", d, (A[i] < B[i]) ? trunc(A[i] + B[i] + S[2 * i]) : 0);
    end

    if (MEMMINW == 8) begin
      send(mem(VLD, 5, 2, 0, 0, 0, 0, 0));       // v5 = signed bytes of S
      send(mem(VST, 5, 3, MW));
      wait_idle();
      for (int i = 0; i < MVL; i++) begin
        logic [7:0] by;
        by = (EB == 4) ? S[i / 4][8 * (i % 4) +: 8] : S[i / 2][8 * (i % 2) +: 8];
        get_elem(32'h2000, i, d);
        check("byte load", d, trunc(32'($signed(by))));
      end
    end

    if (MACL > 0) begin
      send(mk(VMAC, 0, 1, 2));
      send(mk(VCCZACC, 6, 0, 0));
      for (int c = 0; c < NCH; c++) begin
        // chain c covers lanes [c*4*MACL, (c+1)*4*MACL)
        sum = 0;
        for (int i = 0; i < MVL; i++)
          if ((i % NLANE) / (4 * MACL) == c)
            sum += 40'($signed(A[i][15:0])) * 40'($signed(B[i][15:0]));
        send(mk(VEXT, 0, 6, c));
        getres(d);
        check("MAC chain total", d, trunc(sum[31:0]));
      end
    end

    send(mk(VEXTV, 7, 1, 0), 3);                 // v7[i] = A[i+3]
    send(mem(VST, 7, 3, MW));
    wait_idle();
    for (int i = 0; i < MVL; i++) begin
      get_elem(32'h2000, i, d);
      check("vext.vv", d, (i + 3 < MVL) ? A[i + 3] : 0);
    end

    if (LMEMN > 0) begin
      for (int k = 0; k < 256; k++) begin
        T[k] = $urandom();
        send(mk(VMOV, 30, 0, 0, 0, 1), k);
        send(mk(VSTL, 0, 30, 0, 0, 1), T[k]);
      end
      send(mk(VAND, 31, 2, 0, 0, 1), 32'hFF);
      send(mk(VLDL, 8, 31, 0));
      send(mem(VST, 8, 3, 2));
      wait_idle();
      for (int i = 0; i < MVL; i++) begin
        sread(32'h2000 + 4 * i, d);
        check("local memory lookup", d, T[B[i] & 32'hFF]);
      end
    end
    done = 1;
  end
endmodule
