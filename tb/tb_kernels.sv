// tb_kernels: the benchmark kernels written for this vector processor, run
// on the default (8-lane, MVL = 32) configuration and checked against plain
// computations of the same kernels.
//
// The testbench plays the scalar core (instruction queue, result queue and
// the scalar memory port), as in tb_soft_vector_processor. Kernels:
//   FIR      8-tap filter: shift the sample vector (veshift), insert the new
//            sample at element 0 (vins), multiply-accumulate against the
//            coefficients (vmac), reduce through the MAC chain (vcczacc) and
//            return y[n] to the scalar side (vext). 40 outputs.
//   MEDIAN   5x5 median filter over a row of 32 output pixels: unaligned
//            byte loads gather the 25 window values of every pixel into 25
//            byte arrays; a partial bubble sort in memory (byte loads,
//            unsigned vcmplt into vf1, masked vmov and masked byte stores)
//            leaves the 13th smallest value, the median, in array 12.
//   SAD      block-matching motion estimation: two 16x16 candidate windows
//            16 pixels apart are matched at once (VL = 32); per row,
//            post-incremented byte loads, vabsdiff and vadd accumulate; then
//            a vmac under mask vf1 per window and vcczacc give each window's
//            sum of absolute differences. 4 positions, 2 windows each.
//   AES      the table-lookup step of a T-table AES round over 32 blocks:
//            stride-4 word loads bring one state column of every block into
//            one register; for each byte, vand/vsrl form the index, vldl
//            reads a 256-word table from local memory (filled by broadcast
//            vstl), vrot rotates and vxor combines. The table holds random
//            words: only the data movement of the round is checked.
module tb_kernels;
  import svp_pkg::*;

  localparam int MV = MVL_D;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        vi_valid, vi_ready, vr_valid, vr_pop, s_req, s_we, s_ack, idle;
  vinstr_t     vi_instr;
  logic [31:0] vi_scalar, vr_data, s_addr, s_wdata, s_rdata;

  soft_vector_processor dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int n_fir = 0, n_median = 0, n_sad = 0, n_aes = 0;

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

  function automatic vinstr_t mstc(int cr); return mk(VMSTC, cr, 0, 0); endfunction
  function automatic vinstr_t mem(vop_e op, int vd, int bi, int w, int vb = 0, int si = 0,
                                   bit msk = 0, bit uns = 0, int ii = 0);
    return mk(op, vd, bi * 8 + ii, vb, msk, 0, w, uns, si);
  endfunction

  // write a byte array to memory as little-endian words
  logic [7:0] img [8][64];
  logic [7:0] ref_f [20][64];
  logic [7:0] cur [16][16];

  function automatic logic [31:0] rotr(logic [31:0] x, int s);
    return (x >> s) | (x << ((32 - s) % 32));
  endfunction

  initial begin : main
    logic [31:0] d;
    vi_valid = 0; vi_instr = '0; vi_scalar = 0; vr_pop = 0; s_req = 0; s_we = 0;
    s_addr = 0; s_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------------------------------ FIR
    begin
      logic signed [31:0] c [8], x [40];
      logic signed [31:0] y;
      for (int k = 0; k < 8; k++) begin
        c[k] = 32'($signed(8'($urandom())));
        swrite(32'h0100 + 4 * k, c[k]);
      end
      for (int n = 0; n < 40; n++) x[n] = 32'($signed(8'($urandom())));
      send(mstc(CR_VL), 8);
      send(mstc(CR_VBASE + 1), 32'h0100);
      send(mem(VLD, 2, 1, 2));                   // v2 = coefficients
      send(mk(VMOV, 1, 0, 0, 0, 1), 0);          // v1 = 0 (sample window)
      for (int n = 0; n < 40; n++) begin
        send(mk(VESHIFT, 1, 1, 0));              // v1[k] = v1[k-1]
        send(mk(VINS, 1, 0, 0), x[n]);           // v1[0] = x[n]
        send(mk(VMAC, 0, 1, 2));                 // acc += v1 * v2
        send(mk(VCCZACC, 3, 0, 0));              // v3[0] = sum, acc = 0
        send(mk(VEXT, 0, 3, 0));                 // y[n] to the scalar side
        getres(d);
        y = 0;
        for (int k = 0; k < 8; k++) if (n - k >= 0) y += c[k] * x[n - k];
        check("FIR y[n]", d, y);
        n_fir++;
      end
    end

    // --------------------------------------------------------------- MEDIAN
    // The 25 window values of 32 output pixels are gathered into 25 arrays
    // of 32 bytes (array j at 0x1800 + 32*j, element x = pixel x's j-th
    // window value) by unaligned byte loads and byte stores. The partial
    // bubble sort then works in memory: for each i, array i holds the
    // running minimum; for each j > i, the two arrays are loaded, compared
    // (vcmplt unsigned into vf1), and swapped by two stores masked with vf1.
    begin
      logic [7:0] w [25];
      logic [7:0] t;
      int t0;
      for (int r = 0; r < 8; r++)
        for (int x = 0; x < 64; x++) img[r][x] = 8'($urandom());
      for (int r = 0; r < 8; r++)
        for (int x = 0; x < 64; x += 4)
          swrite(32'h1000 + 64 * r + x, {img[r][x+3], img[r][x+2], img[r][x+1], img[r][x]});
      send(mstc(CR_VL), MV);
      // output row 3: window rows 1..5
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) begin
          send(mstc(CR_VBASE + 1), 32'h1000 + 64 * (r + 1) + c);
          send(mem(VLD, 1, 1, 0, 0, 0, 0, 1));               // unsigned bytes
          send(mstc(CR_VBASE + 2), 32'h1800 + 32 * (5 * r + c));
          send(mem(VST, 1, 2, 0));
        end
      t0 = cyc;
      for (int i = 0; i <= 12; i++) begin
        send(mstc(CR_VBASE + 1), 32'h1800 + 32 * i);          // running minimum
        for (int j = i + 1; j < 25; j++) begin
          send(mstc(CR_VBASE + 0), 32'h1800 + 32 * j);
          send(mem(VLD, 1, 0, 0, 0, 0, 0, 1));               // array j
          send(mem(VLD, 2, 1, 0, 0, 0, 0, 1));               // minimum
          send(mk(VCMPLT, 1, 1, 2, 0, 0, 2, 1));             // vf1 = v1 < v2
          send(mk(VMOV, 3, 0, 2, 1));                        // temp = min (masked)
          send(mem(VST, 1, 1, 0, 0, 0, 1));                  // min = array j (masked)
          send(mem(VST, 3, 0, 0, 0, 0, 1));                  // array j = temp (masked)
        end
      end
      wait_idle();
      $display("median sort: %0d cycles for %0d pixels", cyc - t0, MV);
      for (int x = 0; x < MV; x += 4) begin
        sread(32'h1800 + 32 * 12 + x, d);
        for (int b = 0; b < 4; b++) begin
          for (int r = 0; r < 5; r++)
            for (int c = 0; c < 5; c++) w[5 * r + c] = img[r + 1][x + b + c];
          for (int i = 0; i <= 12; i++)
            for (int j = i + 1; j < 25; j++)
              if (w[j] < w[i]) begin t = w[i]; w[i] = w[j]; w[j] = t; end
          check("median", 32'(d[8*b +: 8]), 32'(w[12]));
          n_median++;
        end
      end
    end

    // ------------------------------------------------------------------ SAD
    begin
      int sad;
      for (int r = 0; r < 20; r++)
        for (int x = 0; x < 64; x++) ref_f[r][x] = 8'($urandom());
      for (int r = 0; r < 16; r++)
        for (int x = 0; x < 16; x++) cur[r][x] = 8'($urandom());
      for (int r = 0; r < 20; r++)
        for (int x = 0; x < 64; x += 4)
          swrite(32'h3000 + 64 * r + x, {ref_f[r][x+3], ref_f[r][x+2], ref_f[r][x+1], ref_f[r][x]});
      // current block rows stored twice side by side (32 bytes per row)
      for (int r = 0; r < 16; r++)
        for (int x = 0; x < 32; x += 4)
          swrite(32'h4000 + 32 * r + x, {cur[r][(x+3)%16], cur[r][(x+2)%16], cur[r][(x+1)%16], cur[r][x%16]});
      // element index vector, for the window masks
      for (int i = 0; i < MV; i++) swrite(32'h4800 + 4 * i, i);
      send(mstc(CR_VL), MV);
      send(mstc(CR_VBASE + 3), 32'h4800);
      send(mem(VLD, 40, 3, 2));                  // v40 = 0, 1, ..., 31
      send(mk(VMOV, 41, 0, 0, 0, 1), 1);         // v41 = 1
      for (int dy = 0; dy < 2; dy++)
        for (int dx = 0; dx < 2; dx++) begin
          // sum |ref - cur| per element over the 16 rows (vadd), then one
          // masked vmac per window reduces its 16 elements through the chain
          send(mk(VMOV, 46, 0, 0, 0, 1), 0);            // v46 = 0 (sums)
          send(mstc(CR_VBASE + 1), 32'h3000 + 64 * dy + dx);
          send(mstc(CR_VINC + 1), 64);
          send(mstc(CR_VBASE + 2), 32'h4000);
          send(mstc(CR_VINC + 2), 32);
          for (int r = 0; r < 16; r++) begin
            send(mem(VLD, 42, 1, 0, 1, 0, 0, 1, 1));    // ref row, post-increment
            send(mem(VLD, 43, 2, 0, 1, 0, 0, 1, 2));    // current row, post-increment
            send(mk(VABSDIFF, 44, 42, 43));
            send(mk(VADD, 46, 46, 44));
          end
          for (int win = 0; win < 2; win++) begin
            send(mk(VCMPLT, 1, 40, 0, 0, 1), 16);      // vf1 = element < 16
            if (win == 1) send(mk(VFNOT, 1, 1, 0));    // vf1 = element >= 16
            send(mk(VMAC, 0, 46, 41, 1));               // accumulate under vf1
            send(mk(VCCZACC, 45, 0, 0));
            send(mk(VEXT, 0, 45, 0));
            getres(d);
            sad = 0;
            for (int r = 0; r < 16; r++)
              for (int x = 0; x < 16; x++) begin
                int a, b;
                a = int'(ref_f[r + dy][x + dx + 16 * win]);
                b = int'(cur[r][x]);
                sad += (a > b) ? a - b : b - a;
              end
            check("SAD", d, 32'(sad));
            n_sad++;
          end
        end
    end

    // ------------------------------------------------------------------ AES
    begin
      logic [31:0] tab [256], col [MV], e;
      for (int k = 0; k < 256; k++) tab[k] = $urandom();
      for (int b = 0; b < MV; b++) begin
        col[b] = $urandom();
        swrite(32'h5000 + 16 * b, col[b]);      // column 0 of block b
      end
      send(mstc(CR_VL), MV);
      for (int k = 0; k < 256; k++) begin
        send(mk(VMOV, 30, 0, 0, 0, 1), k);
        send(mk(VSTL, 0, 30, 0, 0, 1), tab[k]);  // broadcast table word k
      end
      send(mstc(CR_VBASE + 4), 32'h5000);
      send(mstc(CR_VSTRIDE + 1), 4);
      send(mem(VLDS, 50, 4, 2, 0, 1));           // v50 = column 0 of every block
      send(mk(VMOV, 51, 0, 0, 0, 1), 0);         // v51 = 0
      for (int b = 0; b < 4; b++) begin
        send(mk(VSRL, 52, 50, 0, 0, 1), 8 * b);
        send(mk(VAND, 52, 52, 0, 0, 1), 32'hFF); // byte b = table index
        send(mk(VLDL, 53, 52, 0));               // table lookup
        send(mk(VROT, 53, 53, 0, 0, 1), 8 * b);
        send(mk(VXOR, 51, 51, 53));
      end
      send(mstc(CR_VBASE + 5), 32'h6000);
      send(mem(VST, 51, 5, 2));
      wait_idle();
      for (int b = 0; b < MV; b++) begin
        e = 0;
        for (int k = 0; k < 4; k++) e ^= rotr(tab[(col[b] >> (8 * k)) & 8'hFF], 8 * k);
        sread(32'h6000 + 4 * b, d);
        check("AES column", d, e);
        n_aes++;
      end
    end

    $display("kernels: fir=%0d median=%0d sad=%0d aes=%0d", n_fir, n_median, n_sad, n_aes);
    if (n_fir == 0 || n_median == 0 || n_sad == 0 || n_aes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
