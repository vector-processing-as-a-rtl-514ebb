// main_mem: on-chip SRAM main memory with a 128-bit port.
//
// The vector memory system is meant to sit on a 128-bit DDR-SDRAM module or
// a large on-chip SRAM; this is the on-chip SRAM choice. LINES words of 128
// bits (default 4096 = 64 KB, the size of the on-chip data memory in the
// reference system). One port: a write stores the bytes enabled in `be`; a
// read returns the addressed line one cycle later. Reset leaves contents
// as they are; testbenches preload through the port.
module main_mem
  import svp_pkg::*;
#(
  parameter int unsigned LINES = MEM_LINES_D
) (
  input  logic                     clk,
  input  logic                     req,
  input  logic                     we,
  input  logic [$clog2(LINES)-1:0] addr,
  input  logic [MEMBYTES-1:0]      be,
  input  logic [MEMW-1:0]          wdata,
  output logic [MEMW-1:0]          rdata
);
  logic [MEMW-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (req && we) begin
      for (int i = 0; i < MEMBYTES; i++)
        if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
    end
    if (req && !we) rdata <= mem[addr];
  end

endmodule
