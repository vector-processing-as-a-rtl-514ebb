// tb_vec_op_bypass: feeds the MVL elements of a source vector through
// modelled lane store buffers (some cycles with a buffer held empty) and
// checks that every destination lane receives exactly the elements
// src[i + k], i < vl, in order, for random k and vl.
module tb_vec_op_bypass;
  import svp_pkg::*;
  localparam int NL = 8, MV = 32;
  int checks = 0, failures = 0;
  logic [31:0] e, k, vl, cnt;
  logic [NL-1:0][31:0] st_data, push_data;
  logic [NL-1:0] st_empty, pop, push;

  vec_op_bypass #(.NLANE(NL), .VPW(32), .MVL(MV)) dut (.*);

  logic [31:0] srcq [NL][$];
  logic [31:0] dstq [NL][$];
  logic [31:0] src [MV];

  initial begin
    for (int t = 0; t < 300; t++) begin
      int guard;
      k = $urandom % (MV + 4);
      vl = $urandom % (MV + 1);
      for (int l = 0; l < NL; l++) begin srcq[l].delete(); dstq[l].delete(); end
      for (int s = 0; s < MV; s++) begin src[s] = $urandom; srcq[s % NL].push_back(src[s]); end
      e = 0; guard = 0;
      while (e < MV && guard < 200) begin
        logic [NL-1:0] hold;
        hold = ($urandom % 3 == 0) ? NL'($urandom) : '0;   // buffers not yet filled
        for (int l = 0; l < NL; l++) begin
          st_empty[l] = (srcq[l].size() == 0) || hold[l];
          st_data[l] = (srcq[l].size() == 0) ? 0 : srcq[l][0];
        end
        #1;
        for (int l = 0; l < NL; l++) begin
          if (pop[l]) void'(srcq[l].pop_front());
          if (push[l]) dstq[l].push_back(push_data[l]);
        end
        e += cnt;
        guard++;
      end
      for (int i = 0; i < vl; i++) begin
        if (i + k < MV) begin
          checks++;
          if (dstq[i % NL].size() == 0 || dstq[i % NL].pop_front() !== src[i + k]) begin
            failures++; $display("FAIL k=%0d vl=%0d element %0d", k, vl, i);
          end
        end
      end
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (dstq[l].size() != 0 || srcq[l].size() != 0) begin failures++; $display("FAIL leftovers lane %0d", l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
