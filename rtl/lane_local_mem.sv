// lane_local_mem: the local memory of one vector lane.
//
// ELEMS*LMEMN words of LMEMW bits in an address space of their own (not
// coherent with main memory). Each element supplies its own address. With
// LMEMSHARE off the memory is split into ELEMS sections of LMEMN words, one
// per element slot of the lane: the slot number selects the section and the
// low log2(LMEMN) address bits the word. With LMEMSHARE on the sections are
// merged into one table of ELEMS*LMEMN words that every element of the lane
// addresses. Reads are synchronous (data one cycle after the address);
// reads return the word zero-extended to VPW bits. Writes store the low
// LMEMW bits of wdata; a scalar broadcast write reaches every lane's memory
// at once, each at its own element address.
module lane_local_mem
  import svp_pkg::*;
#(
  parameter int unsigned VPW       = VPW_D,
  parameter int unsigned ELEMS     = MVL_D / NLANE_D,
  parameter int unsigned LMEMN     = LMEMN_D,
  parameter int unsigned LMEMW     = LMEMW_D,
  parameter bit          LMEMSHARE = LMEMSHARE_D
) (
  input  logic                         clk,
  input  logic                         re,
  input  logic                         we,
  input  logic [$clog2(ELEMS)-1:0]     slot,
  input  logic [VPW-1:0]               addr,
  input  logic [VPW-1:0]               wdata,
  output logic [VPW-1:0]               rdata
);
  localparam int unsigned AW    = $clog2(LMEMN);
  localparam int unsigned SW    = $clog2(ELEMS);
  localparam int unsigned DEPTH = LMEMN * ELEMS;
  localparam int unsigned DW    = AW + SW;

  logic [LMEMW-1:0] mem [DEPTH];
  logic [DW-1:0]    a;
  logic [LMEMW-1:0] q;

  // private sections: {slot, low address bits}; merged: low address bits
  assign a = LMEMSHARE ? addr[DW-1:0] : {slot, addr[AW-1:0]};

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wdata[LMEMW-1:0];
    if (re) q <= mem[a];
  end

  assign rdata = VPW'(q);

endmodule
