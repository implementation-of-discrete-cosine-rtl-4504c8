// tb_dct1d: self-checking test of the eight-point Arai 1-D DCT.
//
// Two instances: the row configuration (9-bit inputs, the module defaults)
// and the column configuration (13-bit inputs). Vectors are streamed one per
// clock; every output is compared with the DCT evaluated in floating point,
// S_k = c(k) * sum_n a(n) cos((2n+1)k pi/16), c(0)=1, c(k)=2cos(k pi/16),
// within 2 plus the input's absolute sum / 8192 (product rounding plus
// the error of the 12-bit constants). The latency of
// exactly 3 clocks and one result per clock are checked too.
module tb_dct1d;
  localparam int IWA = 9, IWB = 13, OW = 19, NV = 400;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                  vin = 0;
  logic signed [IWA-1:0] aa [8];
  logic signed [IWB-1:0] ab [8];
  logic                  va, vb;
  logic signed [OW-1:0]  sa [8], sb [8];

  dct1d dut_a (.clk, .rst_n, .in_valid(vin), .a(aa), .out_valid(va), .s(sa));
  dct1d #(.IW(IWB), .OW(OW)) dut_b (.clk, .rst_n, .in_valid(vin), .a(ab),
                                    .out_valid(vb), .s(sb));

  // stimulus history for the reference
  int hist_a [NV][8], hist_b [NV][8];
  int sent_cyc [NV];
  int nsent = 0, nrecv = 0, cyc = 0;

  function automatic real ref_s(int x [8], int k);
    real acc = 0.0;
    for (int n = 0; n < 8; n++) acc += x[n] * $cos((2*n+1) * k * PI / 16.0);
    if (k != 0) acc *= 2.0 * $cos(k * PI / 16.0);
    return acc;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // rounding of the products (<= 0.5 each) plus the error of the 12-bit
  // constants, which grows with the size of the input
  function automatic real tol(int x [8]);
    real l1 = 0.0;
    for (int n = 0; n < 8; n++) l1 += (x[n] < 0) ? -x[n] : x[n];
    return 2.0 + l1 / 8192.0;
  endfunction

  function automatic int pick(int lo, int hi, int mode, int n);
    case (mode)
      0: return lo + int'($urandom % (hi - lo + 1));
      1: return (n % 2) ? hi : lo;          // alternating extremes
      2: return ((n == 0) || (n == 3) || (n == 5) || (n == 6)) ? hi : lo;
      default: return ($urandom % 2) ? hi : lo;
    endcase
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // drive
  initial begin
    for (int k = 0; k < 8; k++) begin aa[k] = '0; ab[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    while (nsent < NV) begin
      int mode;
      mode = nsent % 5;
      for (int n = 0; n < 8; n++) begin
        hist_a[nsent][n] = pick(-256, 255, mode, n);
        hist_b[nsent][n] = pick(-2574, 2574, mode, n);
        aa[n] <= IWA'(hist_a[nsent][n]);
        ab[n] <= IWB'(hist_b[nsent][n]);
      end
      vin <= ($urandom % 4 != 0) || nsent < 20;  // mostly back-to-back
      @(posedge clk);
      if (vin) begin
        sent_cyc[nsent] = cyc;
        nsent++;
      end
    end
    vin <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nrecv != NV) begin
      failures++;
      $display("FAIL: %0d of %0d results", nrecv, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (va !== vb) begin failures++; $display("FAIL: valid mismatch"); end
    if (va) begin
      if (nrecv >= nsent) begin
        failures++; $display("FAIL: result without input");
      end else begin
        checks++;
        if (cyc - sent_cyc[nrecv] != 3) begin
          failures++;
          $display("FAIL: latency %0d", cyc - sent_cyc[nrecv]);
        end
        for (int k = 0; k < 8; k++) begin
          real ra, rb, ta, tb;
          ra = ref_s(hist_a[nrecv], k);
          rb = ref_s(hist_b[nrecv], k);
          ta = tol(hist_a[nrecv]);
          tb = tol(hist_b[nrecv]);
          checks += 2;
          if (absr(real'(sa[k]) - ra) > ta) begin
            failures++;
            $display("FAIL row-config vec %0d S%0d = %0d, expected %f", nrecv, k, sa[k], ra);
          end
          if (absr(real'(sb[k]) - rb) > tb) begin
            failures++;
            $display("FAIL col-config vec %0d S%0d = %0d, expected %f", nrecv, k, sb[k], rb);
          end
        end
      end
      nrecv++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
