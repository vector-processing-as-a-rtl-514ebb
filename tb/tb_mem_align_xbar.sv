// tb_mem_align_xbar: random lines and offsets at byte, halfword and word
// width; checks sign/zero extension on the load side and data placement
// and byte enables on the store side. A second instance built for 32-bit
// minimum width must perform narrower accesses as words.
module tb_mem_align_xbar;
  import svp_pkg::*;
  localparam int NL = 8;
  int checks = 0, failures = 0;
  logic [1:0] mw;
  logic uns;
  logic [MEMW-1:0] ld_line, st_line, st_line32;
  logic [NL-1:0][3:0] ld_boff;
  logic [NL-1:0][31:0] ld_data, ld_data32;
  logic [3:0] st_valid;
  logic [3:0][3:0] st_boff;
  logic [3:0][31:0] st_data;
  logic [15:0] st_be, st_be32;

  mem_align_xbar #(.NLANE(NL), .VPW(32), .MEMMINW(8)) dut (.*);
  mem_align_xbar #(.NLANE(NL), .VPW(32), .MEMMINW(32)) dut32 (
    .mw, .uns, .ld_line, .ld_boff, .ld_data(ld_data32), .st_valid, .st_boff, .st_data,
    .st_line(st_line32), .st_be(st_be32));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [MEMW-1:0] el;
      logic [15:0] eb;
      int sz;
      mw = 2'($urandom % 3); uns = 1'($urandom);
      sz = 1 << mw;
      for (int i = 0; i < 4; i++) ld_line[32 * i +: 32] = $urandom;
      for (int l = 0; l < NL; l++) ld_boff[l] = 4'(($urandom % (16 / sz)) * sz);
      // store: distinct aligned slots
      el = 0; eb = 0;
      for (int j = 0; j < 4; j++) begin
        st_valid[j] = 1'($urandom);
        st_boff[j] = 4'(j * 4 + (($urandom % 4) / sz) * sz);
        st_data[j] = $urandom;
        if (st_valid[j])
          for (int k = 0; k < sz; k++) begin
            el[8 * (st_boff[j] + k) +: 8] = st_data[j][8 * k +: 8];
            eb[st_boff[j] + k] = 1;
          end
      end
      #1;
      for (int l = 0; l < NL; l++) begin
        logic [31:0] w, e;
        w = 32'({32'd0, ld_line} >> (8 * ld_boff[l]));
        case (mw)
          0: e = uns ? {24'd0, w[7:0]} : {{24{w[7]}}, w[7:0]};
          1: e = uns ? {16'd0, w[15:0]} : {{16{w[15]}}, w[15:0]};
          default: e = w;
        endcase
        checks++;
        if (ld_data[l] !== e) begin failures++; $display("FAIL ld lane %0d mw %0d %h exp %h", l, mw, ld_data[l], e); end
        if (ld_boff[l][1:0] == 0) begin
          checks++;
          if (ld_data32[l] !== w) begin failures++; $display("FAIL ld32"); end
        end
      end
      checks += 2;
      if (st_line !== el) begin failures++; $display("FAIL st line"); end
      if (st_be !== eb)   begin failures++; $display("FAIL st be %h exp %h", st_be, eb); end
      if (mw != 2 && st_boff[3][1:0] == 0) begin
        // 32-bit-only crossbar: narrower accesses are done as words
        logic [15:0] eb32;
        eb32 = 0;
        for (int j = 0; j < 4; j++) if (st_valid[j]) eb32 |= 16'hF << st_boff[j];
        checks++;
        if (st_be32 !== eb32) begin failures++; $display("FAIL st be32 %h exp %h", st_be32, eb32); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
