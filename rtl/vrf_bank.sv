// vrf_bank: one lane's partition of the vector register file.
//
// The register file is element-partitioned: every lane holds all NVREG vector
// registers, but only the ELEMS elements of each register that are mapped to
// it (element e of a register lives in lane e mod NLANE, slot e / NLANE).
// A partition is one write port and two read ports, built as two copies of a
// one-write one-read memory that are always written together, which is how
// the processor obtains its second read port from FPGA block RAM.
// Address = {register number, slot}. Reads are synchronous: the data for an
// address presented in cycle t appears in cycle t+1. A read of the word that
// is being written in the same cycle returns the new data (write-through
// bypass), so a dependent instruction may issue right behind its producer.
module vrf_bank
  import svp_pkg::*;
#(
  parameter int unsigned VPW   = VPW_D,
  parameter int unsigned ELEMS = MVL_D / NLANE_D
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [$clog2(NVREG*ELEMS)-1:0]     waddr,
  input  logic [VPW-1:0]                     wdata,
  input  logic [$clog2(NVREG*ELEMS)-1:0]     raddr_a,
  input  logic [$clog2(NVREG*ELEMS)-1:0]     raddr_b,
  output logic [VPW-1:0]                     rdata_a,
  output logic [VPW-1:0]                     rdata_b
);
  localparam int unsigned DEPTH = NVREG * ELEMS;

  logic [VPW-1:0] copy_a [DEPTH];
  logic [VPW-1:0] copy_b [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      copy_a[waddr] <= wdata;
      copy_b[waddr] <= wdata;
    end
    rdata_a <= (we && waddr == raddr_a) ? wdata : copy_a[raddr_a];
    rdata_b <= (we && waddr == raddr_b) ? wdata : copy_b[raddr_b];
  end

endmodule
