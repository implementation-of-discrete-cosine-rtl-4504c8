// mem_in: input block memory, 64 pixels of 8 bits, stored row-major
// (address = row*8 + column).
//
// The 2-D DCT engine reads it through addr; dout is registered (one clock
// read latency, like an FPGA block RAM) and carries the unsigned pixel
// zero-extended to a 9-bit two's-complement number, the input format of the
// row transform. A write port (we/waddr/wdata) loads a new block; a read and
// a write in the same clock to the same address return the old pixel.
// The memory starts cleared to zero.
// The 64 x 8-bit size follows the document; the load port replaces the fixed
// initial contents of the document's input ROM and is this design's choice.
module mem_in #(
  parameter int DEPTH = dct_pkg::NN,
  parameter int PIX_W = dct_pkg::PIX_W,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [PIX_W-1:0]   wdata,
  input  logic [AW-1:0]      addr,
  output logic signed [PIX_W:0] dout
);
  logic [PIX_W-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    dout <= {1'b0, mem[addr]};
  end

endmodule
