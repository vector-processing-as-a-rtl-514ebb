// mem_align_xbar: the memory alignment crossbar.
//
// Purely combinational. Moves data elements between their positions in a
// 128-bit memory line and the vector lanes, at byte, halfword or word
// granularity (mw = 0, 1, 2). MEMMINW sets the narrowest width the crossbar
// is built for: a narrower access is performed at that width.
//  Load side : every lane l picks the element at byte offset ld_boff[l] of
//              `ld_line` and sign- or zero-extends it (`uns`) to VPW bits.
//  Store side: up to ST_PER_CYC elements st_data[j] are placed at byte
//              offsets st_boff[j] of `st_line`, with byte enables `st_be`
//              set for the bytes of every element whose st_valid[j] is high.
// Offsets are assumed aligned to the element width.
module mem_align_xbar
  import svp_pkg::*;
#(
  parameter int unsigned NLANE   = NLANE_D,
  parameter int unsigned VPW     = VPW_D,
  parameter int unsigned MEMMINW = MEMMINW_D
) (
  input  logic [1:0]                      mw,
  input  logic                            uns,
  input  logic [MEMW-1:0]                 ld_line,
  input  logic [NLANE-1:0][3:0]           ld_boff,
  output logic [NLANE-1:0][VPW-1:0]       ld_data,
  input  logic [ST_PER_CYC-1:0]           st_valid,
  input  logic [ST_PER_CYC-1:0][3:0]      st_boff,
  input  logic [ST_PER_CYC-1:0][VPW-1:0]  st_data,
  output logic [MEMW-1:0]                 st_line,
  output logic [MEMBYTES-1:0]             st_be
);
  localparam logic [1:0] MINMW = (MEMMINW >= 32) ? 2'd2 : (MEMMINW >= 16) ? 2'd1 : 2'd0;

  logic [1:0] emw;
  assign emw = (mw < MINMW) ? MINMW : mw;

  function automatic logic [31:0] pick(logic [MEMW-1:0] line, logic [3:0] boff,
                                       logic [1:0] w, logic u);
    logic [MEMW+31:0] ext;
    logic [31:0]      word;
    ext  = {32'd0, line};
    word = ext[8*boff +: 32];
    unique case (w)
      2'd0:    return u ? {24'd0, word[7:0]}  : {{24{word[7]}},  word[7:0]};
      2'd1:    return u ? {16'd0, word[15:0]} : {{16{word[15]}}, word[15:0]};
      default: return word;
    endcase
  endfunction

  always_comb begin
    for (int l = 0; l < NLANE; l++)
      ld_data[l] = VPW'(pick(ld_line, ld_boff[l], emw, uns));
  end

  always_comb begin
    st_line = '0;
    st_be   = '0;
    for (int j = 0; j < ST_PER_CYC; j++) begin
      if (st_valid[j]) begin
        for (int k = 0; k < 4; k++) begin
          if (k < (1 << emw)) begin
            st_line[8*(st_boff[j] + 4'(k)) +: 8] = 8'(32'(st_data[j]) >> (8*k));
            st_be[st_boff[j] + 4'(k)]            = 1'b1;
          end
        end
      end
    end
  end

endmodule
