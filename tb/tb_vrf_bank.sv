// tb_vrf_bank: writes random words, reads them back on both ports one cycle
// later, and checks the write-to-read forwarding of a same-cycle access.
module tb_vrf_bank;
  import svp_pkg::*;
  localparam int E = 4, AW = $clog2(NVREG * E);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [AW-1:0] waddr, raddr_a, raddr_b;
  logic [31:0] wdata, rdata_a, rdata_b;
  logic [31:0] model [NVREG * E];
  int checks = 0, failures = 0;

  vrf_bank #(.VPW(32), .ELEMS(E)) dut (.*);

  initial begin
    we = 0; waddr = 0; raddr_a = 0; raddr_b = 0; wdata = 0;
    for (int i = 0; i < NVREG * E; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] ea, eb;
      @(negedge clk);
      we = $urandom % 2; waddr = AW'($urandom); wdata = $urandom;
      raddr_a = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      raddr_b = ($urandom % 4 == 0) ? waddr : AW'($urandom);
      ea = (we && waddr == raddr_a) ? wdata : model[raddr_a];
      eb = (we && waddr == raddr_b) ? wdata : model[raddr_b];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("FAIL a %h exp %h", rdata_a, ea); end
      if (rdata_b !== eb) begin failures++; $display("FAIL b %h exp %h", rdata_b, eb); end
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
