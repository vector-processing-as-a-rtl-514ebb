// tb_mac_unit: two MAC units in one cascade chain. Random 4-lane products
// with random enables are accumulated; the chain output must equal the sum
// of both accumulators; `zero` clears them.
module tb_mac_unit;
  import svp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic acc_en, zero;
  logic [3:0] en0, en1;
  logic [3:0][31:0] a0, b0, a1, b1;
  logic [MACW-1:0] c0, c1, s0, s1;

  mac_unit u0 (.clk, .rst_n, .acc_en, .zero, .en(en0), .a(a0), .b(b0), .cas_in('0), .cas_out(c0));
  mac_unit u1 (.clk, .rst_n, .acc_en, .zero, .en(en1), .a(a1), .b(b1), .cas_in(c0), .cas_out(c1));

  function automatic logic [MACW-1:0] psum(logic [3:0] en, logic [3:0][31:0] a, logic [3:0][31:0] b);
    logic [MACW-1:0] s = 0;
    for (int i = 0; i < 4; i++)
      if (en[i]) s += MACW'($signed(a[i][15:0]) * $signed(b[i][15:0]));
    return s;
  endfunction

  initial begin
    acc_en = 0; zero = 0; en0 = 0; en1 = 0; a0 = 0; b0 = 0; a1 = 0; b1 = 0;
    s0 = 0; s1 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks += 2;
      if (c1 !== s0 + s1) begin failures++; $display("FAIL chain %h exp %h", c1, s0 + s1); end
      if (c0 !== s0) begin failures++; $display("FAIL unit0 %h exp %h", c0, s0); end
      acc_en = ($urandom % 4) != 0;
      zero = ($urandom % 16) == 0;
      en0 = 4'($urandom); en1 = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        a0[i] = $urandom; b0[i] = $urandom; a1[i] = $urandom; b1[i] = $urandom;
      end
      if (zero) begin s0 = 0; s1 = 0; end
      else if (acc_en) begin s0 += psum(en0, a0, b0); s1 += psum(en1, a1, b1); end
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
