// tb_main_mem: byte-enabled writes and one-cycle-latency reads of the
// 128-bit on-chip memory, against a model (reduced to 64 lines).
module tb_main_mem;
  import svp_pkg::*;
  localparam int L = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req, we;
  logic [5:0] addr;
  logic [15:0] be;
  logic [127:0] wdata, rdata;
  logic [127:0] m [L];

  main_mem #(.LINES(L)) dut (.*);

  initial begin
    req = 0; we = 0; addr = 0; be = 0; wdata = 0;
    for (int i = 0; i < L; i++) begin
      @(negedge clk); req = 1; we = 1; addr = 6'(i); be = '1;
      wdata = {$urandom, $urandom, $urandom, $urandom}; m[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = 1; we = 1'($urandom); addr = 6'($urandom); be = 16'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (we) begin
        for (int b = 0; b < 16; b++) if (be[b]) m[addr][8 * b +: 8] = wdata[8 * b +: 8];
      end else begin
        logic [127:0] e;
        e = m[addr];
        @(posedge clk); #1;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL line %0d", addr); end
      end
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
