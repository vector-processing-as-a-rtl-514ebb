// tb_lane_local_mem: checks the private mode (each slot owns N words, the
// slot number forms the high address bits) and the shared mode
// (the sections merged into one table all slots see), with synchronous reads.
module tb_lane_local_mem;
  import svp_pkg::*;
  localparam int E = 4, N = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic re, we;
  logic [1:0] slot;
  logic [31:0] addr, wdata, rd_split, rd_shared;
  logic [31:0] m_split [E*N], m_shared [E*N];

  lane_local_mem #(.VPW(32), .ELEMS(E), .LMEMN(N), .LMEMW(32), .LMEMSHARE(1'b0)) u_split (
    .clk, .re, .we, .slot, .addr, .wdata, .rdata(rd_split));
  lane_local_mem #(.VPW(32), .ELEMS(E), .LMEMN(N), .LMEMW(32), .LMEMSHARE(1'b1)) u_shared (
    .clk, .re, .we, .slot, .addr, .wdata, .rdata(rd_shared));

  initial begin
    re = 0; we = 0; slot = 0; addr = 0; wdata = 0;
    // fill both completely
    for (int s = 0; s < E; s++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk); we = 1; slot = 2'(s); addr = 32'(i) | 32'h100; wdata = $urandom;
        m_split[s * N + i] = wdata;
      end
    for (int i = 0; i < E * N; i++) begin
      @(negedge clk); we = 1; slot = 2'($urandom); addr = 32'(i); wdata = $urandom;
      m_shared[i] = wdata;
      m_split[slot * N + (i % N)] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] es, eh;
      @(negedge clk);
      re = 1; slot = 2'($urandom); addr = $urandom;
      es = m_split[slot * N + (addr % N)];
      eh = m_shared[addr % (E * N)];
      @(posedge clk); #1;
      checks += 2;
      if (rd_split !== es)  begin failures++; $display("FAIL split %h exp %h", rd_split, es); end
      if (rd_shared !== eh) begin failures++; $display("FAIL shared %h exp %h", rd_shared, eh); end
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
