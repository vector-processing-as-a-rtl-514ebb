// vec_op_bypass: the vector operation bypass of the memory interface.
//
// Lets the memory unit move vector elements from the lanes' store buffers
// straight back into their load buffers, without touching memory, so that
// vector manipulation instructions can be done in the memory path. The one
// built here is element extraction (vext.vv): destination element i takes
// source element i + k.
//
// Combinational. The source register's elements arrive in the store
// buffers in order (element s in lane s mod NLANE). In one cycle the
// bypass takes the run of up to NLANE consecutive source elements starting
// at `e` whose buffers are not empty (`cnt` of them) and pops them; every
// one with k <= s < k + vl is routed to the load buffer of lane
// (s - k) mod NLANE, the lane of its destination element. The memory unit
// advances `e` by `cnt` each cycle until all MVL source elements are used.
module vec_op_bypass
  import svp_pkg::*;
#(
  parameter int unsigned NLANE = NLANE_D,
  parameter int unsigned VPW   = VPW_D,
  parameter int unsigned MVL   = MVL_D
) (
  input  logic [31:0]               e,
  input  logic [31:0]               k,
  input  logic [31:0]               vl,
  input  logic [NLANE-1:0][VPW-1:0] st_data,
  input  logic [NLANE-1:0]          st_empty,
  output logic [31:0]               cnt,
  output logic [NLANE-1:0]          pop,
  output logic [NLANE-1:0]          push,
  output logic [NLANE-1:0][VPW-1:0] push_data
);
  localparam int unsigned LW = $clog2(NLANE);

  always_comb begin
    logic stop;
    cnt       = 0;
    stop      = 1'b0;
    pop       = '0;
    push      = '0;
    push_data = '0;
    for (int j = 0; j < NLANE; j++) begin
      logic [31:0] s;
      s = e + 32'(j);
      if (!stop && s < 32'(MVL) && !st_empty[LW'(s)]) begin
        cnt = 32'(j + 1);
        pop[LW'(s)] = 1'b1;
        if (s >= k && s < k + vl) begin
          push[LW'(s - k)]      = 1'b1;
          push_data[LW'(s - k)] = st_data[LW'(s)];
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

endmodule
