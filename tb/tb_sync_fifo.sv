// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, full/empty/count and simultaneous push and pop.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.W(W), .DEPTH(D)) dut (.*);

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || count !== q.size()) begin
        failures++; $display("FAIL flags size=%0d count=%0d", q.size(), count);
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("FAIL data %h exp %h", rdata, q[0]); end
      end
      push  = ($urandom % 2) && (q.size() < D);
      pop   = ($urandom % 2) && (q.size() > 0);
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
