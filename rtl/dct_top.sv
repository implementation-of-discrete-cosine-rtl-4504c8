// dct_top: 8 x 8 two-dimensional DCT with its block and result memories.
//
// Four parts, wired as in the reference implementation's schematic:
//   x1 mem_in     input block, 64 pixels of 8 bits (load port brought out)
//   x2 dct_module row 1-D DCT -> transpose buffer -> column 1-D DCT
//   x3 mem_out    row-pass (1-D) results, 64 x 19-bit signed
//   x4 mem_out2   2-D coefficients X(k,l) at address k*8+l, 64 x 19-bit signed
//
// Use: write the 64 pixels (row-major, address r*8+c) through load_*, pulse
// enable while busy is low, wait for done (257 clocks), then read the
// coefficients through out2_raddr/output2 (one clock read latency). The row
// results can be read the same way through out1_raddr/output1 once flag is
// high. The coefficients are those of Arai's scaled DCT in both directions:
// X(k,l) = c(k) c(l) sum_m sum_n x(m,n) cos((2m+1)k pi/16) cos((2n+1)l pi/16)
// with c(0) = 1 and c(k) = 2 cos(k pi/16) otherwise, to within rounding.
// The engine's memory-side buses (addr1, out_rom, addr2, addr3) are brought
// out for observation, as in the reference schematic.
// The memory split and the names follow the document; the load and read
// ports and the busy/done outputs are this design's choices.
module dct_top (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  // loading the input block
  input  logic                        load_we,
  input  logic [dct_pkg::AW-1:0]      load_addr,
  input  logic [dct_pkg::PIX_W-1:0]   load_data,
  // reading the results
  input  logic [dct_pkg::AW-1:0]      out1_raddr,
  output logic signed [dct_pkg::OUT_W-1:0] output1,
  input  logic [dct_pkg::AW-1:0]      out2_raddr,
  output logic signed [dct_pkg::OUT_W-1:0] output2,
  // status and observation
  output logic                        flag,
  output logic                        done,
  output logic                        busy,
  output logic [dct_pkg::AW-1:0]      addr1,
  output logic signed [dct_pkg::PIX_W:0] out_rom,
  output logic [dct_pkg::AW-1:0]      addr2,
  output logic [dct_pkg::AW-1:0]      addr3
);
  import dct_pkg::*;

  logic                    we2, we3;
  logic signed [OUT_W-1:0] data_out1, data_out2;

  mem_in x1 (
    .clk, .we(load_we), .waddr(load_addr), .wdata(load_data),
    .addr(addr1), .dout(out_rom)
  );

  dct_module x2 (
    .clk, .rst_n, .enable,
    .addr1, .data_in(out_rom),
    .we2, .addr2, .data_out1,
    .we3, .addr3, .data_out2,
    .flag, .done, .busy
  );

  coef_ram x3 (
    .clk, .we(we2), .waddr(addr2), .wdata(data_out1),
    .raddr(out1_raddr), .rdata(output1)
  );

  coef_ram x4 (
    .clk, .we(we3), .waddr(addr3), .wdata(data_out2),
    .raddr(out2_raddr), .rdata(output2)
  );

endmodule
