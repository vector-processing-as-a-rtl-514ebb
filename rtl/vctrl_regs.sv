// vctrl_regs: the vector control registers.
//
// Holds the vector length VL and NVBASE each of the base-address (vbase),
// post-increment (vinc, in bytes) and stride (vstride, in elements)
// registers used by vector memory instructions. Register numbers as seen by
// vmstc/vmcts: 0 = VL, 8+i = vbase i, 16+i = vinc i, 24+i = vstride i;
// other numbers read as 0 and ignore writes. A write to VL is clamped to
// MVL. `inc_en` adds vinc[inc_idx] to vbase[base_idx] (post-increment after
// a vector memory access); a vmstc in the same cycle takes precedence.
// Reset: VL = MVL, all other registers 0. Reads are combinational.
module vctrl_regs
  import svp_pkg::*;
#(
  parameter int unsigned MVL = MVL_D,
  localparam int unsigned VLW = $clog2(MVL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [5:0]        waddr,
  input  logic [31:0]       wdata,
  input  logic [5:0]        raddr,
  output logic [31:0]       rdata,
  input  logic              inc_en,
  input  logic [2:0]        base_idx,
  input  logic [2:0]        inc_idx,
  output logic [VLW-1:0]    vl,
  output logic [NVBASE-1:0][31:0] vbase,
  output logic [NVBASE-1:0][31:0] vinc,
  output logic [NVBASE-1:0][31:0] vstride
);
  always_comb begin
    rdata = '0;
    if (raddr == CR_VL) rdata = 32'(vl);
    else if (raddr[5:3] == CR_VBASE[5:3])   rdata = vbase[raddr[2:0]];
    else if (raddr[5:3] == CR_VINC[5:3])    rdata = vinc[raddr[2:0]];
    else if (raddr[5:3] == CR_VSTRIDE[5:3]) rdata = vstride[raddr[2:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vl      <= VLW'(MVL);
      vbase   <= '0;
      vinc    <= '0;
      vstride <= '0;
    end else begin
      if (inc_en) vbase[base_idx] <= vbase[base_idx] + vinc[inc_idx];
      if (we) begin
        if (waddr == CR_VL)                     vl <= (wdata > 32'(MVL)) ? VLW'(MVL) : VLW'(wdata);
        else if (waddr[5:3] == CR_VBASE[5:3])   vbase[waddr[2:0]]   <= wdata;
        else if (waddr[5:3] == CR_VINC[5:3])    vinc[waddr[2:0]]    <= wdata;
        else if (waddr[5:3] == CR_VSTRIDE[5:3]) vstride[waddr[2:0]] <= wdata;
      end
    end
  end

endmodule
