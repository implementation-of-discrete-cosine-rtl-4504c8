// dct1d: eight-point scaled 1-D DCT after Arai, Agui and Nakajima.
//
// The flow graph computes, with 29 additions and 5 constant multiplications,
// outputs S_k that equal the DCT sum Y(k) = sum_n a(n) cos((2n+1)k pi/16)
// times a fixed factor: S_0 = Y(0) and S_k = 2 cos(k pi/16) Y(k) for k > 0.
// These factors are left in the result (a later quantiser can absorb them).
//
// Stages (node names of the flow graph):
//   b: input butterflies     b0=a0+a7 b1=a1+a6 b2=a3-a4 b3=a1-a6
//                            b4=a2+a5 b5=a3+a4 b6=a2-a5 b7=a0-a7
//   c: second butterflies    c0=b0+b5 c1=b1-b4 c2=b2+b6 c3=b1+b4
//                            c4=b0-b5 c5=b3+b7 c6=b3+b6 c7=b7
//   d: third stage           d0=c0+c3 d1=c0-c3 d3=c1+c4 d4=c2-c5
//   e: multipliers           e2=m3*c2 e3=m1*c6 e4=m4*c5 e6=m1*d3 e7=m2*d4
//   f: post-multiply adds    f2=c4+e6 f3=c4-e6 f4=b7+e3 f5=b7-e3
//                            f6=e2+e7 f7=e4+e7
//   S: outputs               S0=d0 S4=d1 S2=f2 S6=f3
//                            S1=f4+f7 S7=f4-f7 S5=f5+f6 S3=f5-f6
// The stage equations and the output order are the flow graph's; the
// fixed-point format, the internal width and the pipeline registers are this
// design's choices. Each constant is rounded to CF fractional bits and each
// product is rounded half-up to an integer. Internal nodes are IW+4 bits wide,
// which never overflows: no node has a gain (sum of absolute weights) above
// 10.06. Outputs are sign-extended to OW bits.
//
// Timing: fully pipelined, one vector per clock. Registers follow stage c,
// stage e and the output, so s/out_valid appear LATENCY = 3 clocks after
// a/in_valid. Only the valid bits are reset.
module dct1d #(
  parameter int IW = dct_pkg::IN_W,   // input sample width (signed)
  parameter int OW = dct_pkg::OUT_W,  // output coefficient width (signed)
  parameter int CF = dct_pkg::CF      // fractional bits of the constants
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] a [8],
  output logic                 out_valid,
  output logic signed [OW-1:0] s [8]
);
  import dct_pkg::*;

  localparam int W  = IW + 4;         // internal node width
  localparam int PW = W + CF + 2;     // product width

  typedef logic signed [W-1:0] node_t;

  // constants rounded to CF fractional bits, one integer bit and a sign bit
  localparam logic signed [CF+1:0] K1 = (CF+2)'($rtoi(M1 * (2.0 ** CF) + 0.5));
  localparam logic signed [CF+1:0] K2 = (CF+2)'($rtoi(M2 * (2.0 ** CF) + 0.5));
  localparam logic signed [CF+1:0] K3 = (CF+2)'($rtoi(M3 * (2.0 ** CF) + 0.5));
  localparam logic signed [CF+1:0] K4 = (CF+2)'($rtoi(M4 * (2.0 ** CF) + 0.5));

  // rounded constant product: round(d * k / 2^CF)
  function automatic node_t cmul(node_t d, logic signed [CF+1:0] k);
    logic signed [PW-1:0] p;
    p = PW'(d) * PW'(k) + (PW'(1) <<< (CF - 1));
    return node_t'(p >>> CF);
  endfunction

  // ---- stages b and c (combinational), register 1 ----
  node_t b [8];
  node_t c [8];
  always_comb begin
    node_t x [8];
    for (int i = 0; i < 8; i++) x[i] = node_t'(a[i]);
    b[0] = x[0] + x[7];  b[1] = x[1] + x[6];
    b[2] = x[3] - x[4];  b[3] = x[1] - x[6];
    b[4] = x[2] + x[5];  b[5] = x[3] + x[4];
    b[6] = x[2] - x[5];  b[7] = x[0] - x[7];
    c[0] = b[0] + b[5];  c[1] = b[1] - b[4];
    c[2] = b[2] + b[6];  c[3] = b[1] + b[4];
    c[4] = b[0] - b[5];  c[5] = b[3] + b[7];
    c[6] = b[3] + b[6];  c[7] = b[7];
  end

  node_t c_q [8];
  logic  v1;
  always_ff @(posedge clk) c_q <= c;

  // ---- stages d and e, register 2 ----
  // e0=d0, e1=d1, e5=d5=c4, e8=d8=c7 pass through unchanged
  node_t e [9];
  always_comb begin
    node_t d0, d1, d3, d4;
    d0 = c_q[0] + c_q[3];
    d1 = c_q[0] - c_q[3];
    d3 = c_q[1] + c_q[4];
    d4 = c_q[2] - c_q[5];
    e[0] = d0;
    e[1] = d1;
    e[2] = cmul(c_q[2], K3);   // d2 = c2
    e[3] = cmul(c_q[6], K1);   // d7 = c6
    e[4] = cmul(c_q[5], K4);   // d6 = c5
    e[5] = c_q[4];             // d5 = c4
    e[6] = cmul(d3, K1);
    e[7] = cmul(d4, K2);
    e[8] = c_q[7];             // d8 = c7
  end

  node_t e_q [9];
  logic  v2;
  always_ff @(posedge clk) e_q <= e;

  // ---- stages f and S, register 3 ----
  node_t sn [8];
  always_comb begin
    node_t f2, f3, f4, f5, f6, f7;
    f2 = e_q[5] + e_q[6];
    f3 = e_q[5] - e_q[6];
    f4 = e_q[3] + e_q[8];
    f5 = e_q[8] - e_q[3];
    f6 = e_q[2] + e_q[7];
    f7 = e_q[4] + e_q[7];
    sn[0] = e_q[0];
    sn[4] = e_q[1];
    sn[2] = f2;
    sn[6] = f3;
    sn[1] = f4 + f7;
    sn[7] = f4 - f7;
    sn[5] = f5 + f6;
    sn[3] = f5 - f6;
  end

  always_ff @(posedge clk)
    for (int k = 0; k < 8; k++) s[k] <= OW'(sn[k]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {v1, v2, out_valid} <= '0;
    else        {v1, v2, out_valid} <= {in_valid, v1, v2};

endmodule
