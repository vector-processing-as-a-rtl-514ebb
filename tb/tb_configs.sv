// tb_configs: runs the same short program (tb_cfg_run) on four other
// published configurations of the vector co-processor at once:
//   4 lanes,  MVL 16, MAC chains of 1 unit
//   16 lanes, MVL 64, MAC chains of 4 units
//   16 lanes, MVL 64, word-only memory access, no MAC units, shared local
//             memory (the minimal 16-lane configuration)
//   16 lanes, MVL 64, 16-bit datapath, MAC chains of 4 units, no local
//             memory
// and adds up their checks. A watchdog ends the run if one of them hangs.
module tb_configs;
  logic       d4, d16, d16m, d16w;
  int         c4, c16, c16m, c16w, f4, f16, f16m, f16w;
  int         checks, failures;

  tb_cfg_run #(.NLANE(4),  .MVL(16), .MEMMINW(8),  .MACL(1), .LMEMN(256), .LMEMSHARE(1'b0))
    u_v4f   (.done(d4),   .checks(c4),   .failures(f4));
  tb_cfg_run #(.NLANE(16), .MVL(64), .MEMMINW(8),  .MACL(4), .LMEMN(256), .LMEMSHARE(1'b0))
    u_v16f  (.done(d16),  .checks(c16),  .failures(f16));
  tb_cfg_run #(.NLANE(16), .MVL(64), .MEMMINW(32), .MACL(0), .LMEMN(256), .LMEMSHARE(1'b1))
    u_v16m  (.done(d16m), .checks(c16m), .failures(f16m));
  tb_cfg_run #(.NLANE(16), .MVL(64), .VPW(16), .MEMMINW(8), .MACL(4), .LMEMN(0), .LMEMSHARE(1'b0))
    u_v16w  (.done(d16w), .checks(c16w), .failures(f16w));

  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    #1;   // the runners clear `done` at time 0
    wait (d4 && d16 && d16m && d16w);
    checks = c4 + c16 + c16m + c16w;
    failures = f4 + f16 + f16m + f16w;
    $display("configs: 4 lanes %0d/%0d, 16 lanes %0d/%0d, 16 lanes minimal %0d/%0d, 16 lanes 16-bit %0d/%0d (checks/failures)",
             c4, f4, c16, f16, c16m, f16m, c16w, f16w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c16m + c16w, f4 + f16 + f16m + f16w + 1);
    $finish;
  end
endmodule
