// tb_vflag_file: checks the all-ones reset, random flag writes and the three
// combinational read ports (two operands, mask vf0/vf1) against a model.
module tb_vflag_file;
  import svp_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we, wbit, msel, ra, rb, mask;
  logic [2:0] wsel, rsel_a, rsel_b;
  logic [1:0] slot;
  logic model [NVFLAG][E];
  int checks = 0, failures = 0;

  vflag_file #(.ELEMS(E)) dut (.*);

  initial begin
    we = 0; wbit = 0; msel = 0; wsel = 0; rsel_a = 0; rsel_b = 0; slot = 0;
    for (int f = 0; f < NVFLAG; f++) for (int s = 0; s < E; s++) model[f][s] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rsel_a = 3'($urandom); rsel_b = 3'($urandom); msel = 1'($urandom); slot = 2'($urandom);
      #1;
      checks += 3;
      if (ra !== model[rsel_a][slot] || rb !== model[rsel_b][slot] || mask !== model[msel][slot]) begin
        failures++; $display("FAIL read f%0d/f%0d/m%0d slot %0d", rsel_a, rsel_b, msel, slot);
      end
      we = 1'($urandom); wsel = 3'($urandom); wbit = 1'($urandom);
      @(posedge clk); #1;
      if (we) model[wsel][slot] = wbit;
      we = 0;
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
