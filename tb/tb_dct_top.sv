// tb_dct_top: end-to-end test of the 8 x 8 2-D DCT at its default sizes.
//
// For each block the pixels are loaded through the load port, the transform
// is started with enable, and after done all 64 row results (output1) and
// all 64 coefficients (output2) are read back through the read ports. Row
// results are compared with the floating-point 1-D DCT of each pixel row
// (tolerance 2 + |row|_1/8192); coefficients with the floating-point 1-D DCT
// of the read-back row results of their column (same tolerance) and with
// the floating-point 2-D DCT of the pixels (tolerance 20). All references use
// the scale of the design: c(0)=1, c(k)=2cos(k pi/16) per direction.
// The run also checks the 257-clock block time and the ordering of flag
// and done, and counts each mechanism of the design; a mechanism that never
// happened counts as a failure:
//   blocks transformed, row passes completed (flag), column writes with flag
//   high, a start request ignored while busy, a block reloaded after a
//   previous transform, the observed read bus out_rom matching the pixel at
//   addr1 one clock earlier.
module tb_dct_top;
  localparam real PI = 3.14159265358979323846;
  localparam int  NBLK = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        enable = 0, load_we = 0;
  logic [5:0]  load_addr = 0, out1_raddr = 0, out2_raddr = 0;
  logic [7:0]  load_data = 0;
  logic signed [18:0] output1, output2;
  logic        flag, done, busy;
  logic [5:0]  addr1, addr2, addr3;
  logic signed [8:0] out_rom;

  dct_top dut (.clk, .rst_n, .enable, .load_we, .load_addr, .load_data,
               .out1_raddr, .output1, .out2_raddr, .output2,
               .flag, .done, .busy, .addr1, .out_rom, .addr2, .addr3);

  int pix [64];
  int row_res [64], coef [64];
  int n_blocks = 0, n_flag = 0, n_w3_flag = 0, n_ignored = 0, n_reload = 0;
  int n_rom_ok = 0;
  logic [5:0] addr1_q;
  logic       busy_q;

  // observation of the internal buses
  always @(posedge clk) begin
    addr1_q <= addr1;
    busy_q  <= busy;
    if (rst_n && busy_q && dut.x2.rd_v) begin
      checks++;
      if (int'(out_rom) == pix[addr1_q]) n_rom_ok++;
      else begin failures++; $display("FAIL out_rom %0d at %0d", out_rom, addr1_q); end
    end
    if (dut.we3 && flag) n_w3_flag++;
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

  task automatic load_block(int b);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        int v;
        case (b)
          0: v = 100;                               // flat block
          1: v = ((r + c) % 2 == 1) ? 255 : 0;          // highest frequency
          2: v = 255;
          3: v = (r * 8 + c) * 4;                   // ramp
          default: v = int'($urandom % 256);
        endcase
        pix[r*8+c] = v;
        load_we <= 1; load_addr <= 6'(r*8+c); load_data <= 8'(v);
        @(posedge clk);
      end
    load_we <= 0;
    if (n_blocks > 0) n_reload++;
  endtask

  task automatic run_block(int b);
    int cyc;
    bit flag_before_done;
    load_block(b);
    enable <= 1;
    @(posedge clk);
    #1;
    enable <= 0;
    cyc = 1;
    flag_before_done = 0;
    while (!done && cyc < 2000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (flag && !done) flag_before_done = 1;
      if (cyc == 50) begin
        enable <= 1;             // request while busy: must be ignored
        @(posedge clk);
        #1;
        cyc++;
        enable <= 0;
        n_ignored++;
      end
    end
    n_blocks++;
    if (flag_before_done) n_flag++;
    check(cyc == 257, $sformatf("block %0d took %0d clocks", b, cyc));
    check(flag_before_done, "flag did not precede done");
    @(posedge clk);
    #1;
    check(!busy && done, "engine restarted by the ignored request");
    // read back through the result ports
    for (int i = 0; i < 64; i++) begin
      out1_raddr <= 6'(i);
      out2_raddr <= 6'(i);
      @(posedge clk);
      #1;
      row_res[i] = int'(output1);
      coef[i]    = int'(output2);
    end
    for (int r = 0; r < 8; r++) begin
      int x [8];
      for (int n = 0; n < 8; n++) x[n] = pix[r*8+n];
      for (int l = 0; l < 8; l++)
        check(absr(row_res[r*8+l] - dct8(x, l)) <= tol(x),
              $sformatf("blk %0d row %0d S%0d = %0d", b, r, l, row_res[r*8+l]));
    end
    for (int l = 0; l < 8; l++) begin
      int y [8];
      for (int r = 0; r < 8; r++) y[r] = row_res[r*8+l];
      for (int k = 0; k < 8; k++) begin
        real e2;
        check(absr(coef[k*8+l] - dct8(y, k)) <= tol(y),
              $sformatf("blk %0d X(%0d,%0d) = %0d vs column ref", b, k, l, coef[k*8+l]));
        e2 = 0.0;
        for (int m = 0; m < 8; m++)
          for (int n = 0; n < 8; n++)
            e2 += pix[m*8+n] * $cos((2*m+1) * k * PI / 16.0) * $cos((2*n+1) * l * PI / 16.0);
        e2 *= cf(k) * cf(l);
        check(absr(coef[k*8+l] - e2) <= 20.0,
              $sformatf("blk %0d X(%0d,%0d) = %0d, 2-D ref %f", b, k, l, coef[k*8+l], e2));
      end
    end
    if (b == 0) begin
      // flat block of 100: only the DC term, 64*100
      check(coef[0] == 6400, $sformatf("DC of flat block = %0d", coef[0]));
      for (int i = 1; i < 64; i++)
        check(coef[i] == 0, $sformatf("AC %0d of flat block = %0d", i, coef[i]));
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) pix[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) run_block(b);
    check(n_blocks == NBLK, "blocks transformed");
    check(n_flag > 0, "row pass completion (flag) never seen");
    check(n_w3_flag > 0, "column pass never wrote with flag high");
    check(n_ignored > 0, "no start request while busy");
    check(n_reload > 0, "no block reloaded");
    check(n_rom_ok > 0, "out_rom never observed");
    $display("mechanisms: blocks=%0d flag=%0d col_writes=%0d ignored_starts=%0d reloads=%0d rom_reads=%0d",
             n_blocks, n_flag, n_w3_flag, n_ignored, n_reload, n_rom_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 500 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
