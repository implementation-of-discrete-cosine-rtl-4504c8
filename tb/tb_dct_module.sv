// tb_dct_module: end-to-end test of the 2-D DCT engine with behavioural
// memories on its ports.
//
// The input memory is modelled with its one-clock read latency; every write
// to the row-result and coefficient memories is captured. For each block:
//   - each row result is compared with the floating-point 1-D DCT of the
//     pixels of that row (tolerance 2 + |row|_1/8192),
//   - each 2-D coefficient is compared with the floating-point 1-D DCT of the
//     captured integer row results of its column (same tolerance), and with
//     the floating-point 2-D DCT of the pixels (tolerance 20, the rounding of
//     the row pass amplified by the column pass),
//   - every address is written exactly once per block,
//   - flag rises after the last row write and before the first column write,
//   - done comes 257 clocks after the enable request,
//   - an enable while busy is ignored.
// Blocks: all zero, constant 255, checkerboard 0/255, ramps and random.
module tb_dct_module;
  localparam real PI = 3.14159265358979323846;
  localparam int  NBLK = 12;
  localparam int  BLOCK_CYCLES = 257;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              enable = 0;
  logic [5:0]        addr1, addr2, addr3;
  logic signed [8:0] data_in;
  logic              we2, we3, flag, done, busy;
  logic signed [18:0] data_out1, data_out2;

  dct_module dut (.clk, .rst_n, .enable, .addr1, .data_in,
                  .we2, .addr2, .data_out1, .we3, .addr3, .data_out2,
                  .flag, .done, .busy);

  int pix [64];
  int row_res [64], coef [64];
  int nw2 [64], nw3 [64];
  int flag_seen_at_w3, w2_after_flag;

  always_ff @(posedge clk) data_in <= 9'(pix[addr1]);

  always @(posedge clk) begin
    if (we2) begin
      row_res[addr2] = int'(data_out1);
      nw2[addr2]++;
      if (flag) w2_after_flag++;
    end
    if (we3) begin
      coef[addr3] = int'(data_out2);
      nw3[addr3]++;
      if (flag) flag_seen_at_w3++;
    end
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real cf(int k);
    return (k == 0) ? 1.0 : 2.0 * $cos(k * PI / 16.0);
  endfunction

  function automatic real dct8(int x [8], int k);
    real acc = 0.0;
    for (int n = 0; n < 8; n++) acc += x[n] * $cos((2*n+1) * k * PI / 16.0);
    return acc * cf(k);
  endfunction

  function automatic real tol(int x [8]);
    real l1 = 0.0;
    for (int n = 0; n < 8; n++) l1 += (x[n] < 0) ? -x[n] : x[n];
    return 2.0 + l1 / 8192.0;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic make_block(int b);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int v;
        case (b)
          0: v = 0;
          1: v = 255;
          2: v = ((r + c) % 2) ? 255 : 0;
          3: v = 32 * c;
          4: v = 255 - 32 * r;
          5: v = ((r ^ c) & 4) ? 255 : 0;
          default: v = int'($urandom % 256);
        endcase
        pix[r*8+c] = v;
      end
  endtask

  task automatic run_block(int b);
    int cyc;
    make_block(b);
    for (int i = 0; i < 64; i++) begin nw2[i] = 0; nw3[i] = 0; end
    flag_seen_at_w3 = 0;
    w2_after_flag = 0;
    enable <= 1;
    @(posedge clk);
    #1;
    enable <= 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cyc++;
      // a second request in the middle of the block must be ignored
      if (cyc == 100) enable <= 1;
      if (cyc == 101) enable <= 0;
      if (cyc > 2000) break;
    end
    check(cyc == BLOCK_CYCLES, $sformatf("block %0d took %0d clocks", b, cyc));
    check(flag, "flag low at done");
    check(w2_after_flag == 0, "row write after flag");
    check(flag_seen_at_w3 == 64, "column write before flag");
    for (int i = 0; i < 64; i++) begin
      check(nw2[i] == 1, $sformatf("mem_out[%0d] written %0d times", i, nw2[i]));
      check(nw3[i] == 1, $sformatf("mem_out2[%0d] written %0d times", i, nw3[i]));
    end
    // row pass
    for (int r = 0; r < 8; r++) begin
      int x [8];
      for (int n = 0; n < 8; n++) x[n] = pix[r*8+n];
      for (int l = 0; l < 8; l++) begin
        real e;
        e = dct8(x, l);
        check(absr(row_res[r*8+l] - e) <= tol(x),
              $sformatf("blk %0d row %0d S%0d = %0d, expected %f", b, r, l, row_res[r*8+l], e));
      end
    end
    // column pass, against the captured row results and against the pixels
    for (int l = 0; l < 8; l++) begin
      int y [8];
      for (int r = 0; r < 8; r++) y[r] = row_res[r*8+l];
      for (int k = 0; k < 8; k++) begin
        real e, e2;
        e = dct8(y, k);
        check(absr(coef[k*8+l] - e) <= tol(y),
              $sformatf("blk %0d X(%0d,%0d) = %0d, col ref %f", b, k, l, coef[k*8+l], e));
        e2 = 0.0;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++)
            e2 += pix[m*8+n] * $cos((2*m+1) * k * PI / 16.0) * $cos((2*n+1) * l * PI / 16.0);
        e2 *= cf(k) * cf(l);
        check(absr(coef[k*8+l] - e2) <= 20.0,
              $sformatf("blk %0d X(%0d,%0d) = %0d, 2-D ref %f", b, k, l, coef[k*8+l], e2));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) pix[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!busy && !flag && !done, "status after reset");
    for (int b = 0; b < NBLK; b++) begin
      run_block(b);
      repeat (b % 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 400 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
