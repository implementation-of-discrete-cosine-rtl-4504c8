// coef_ram: 64-word coefficient memory with one write and one read port.
//
// Used twice in the top level: for the row-pass (1-D) results and for the
// final 2-D coefficients. Words are signed, W = 19 bits by default. The write
// port belongs to the DCT engine; the read port (raddr -> rdata, registered,
// one clock latency) lets the user read results at any time. A read of the
// address being written in the same clock returns the old word.
// The memory starts cleared to zero.
// Depth and word width follow the document; the separate read port is this
// design's choice.
module coef_ram #(
  parameter int DEPTH = dct_pkg::NN,
  parameter int W     = dct_pkg::OUT_W,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata
);
  logic signed [W-1:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
