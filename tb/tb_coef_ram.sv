// tb_coef_ram: writes random signed 19-bit words to all 64 addresses while
// reading back on the other port, then reads everything back and checks the
// one-clock read latency and old-data-on-collision behaviour.
module tb_coef_ram;
  localparam int W = 19;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                we = 0;
  logic [5:0]          waddr = 0, raddr = 0;
  logic signed [W-1:0] wdata = 0, rdata;
  int model [64];

  coef_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic expect_rdata(int exp, string what);
    checks++;
    if (int'(rdata) != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, rdata, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) model[a] = 0;
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 64; a++) begin
        int ra;
        ra = (a * 7 + 3) % 64;
        model[a] = int'($urandom % (1 << W)) - (1 << (W - 1));
        we <= 1; waddr <= 6'(a); wdata <= W'(model[a]); raddr <= 6'(ra);
        @(posedge clk); #1;
        // a read of the address being written returns the old word
        if (ra != a) expect_rdata(model[ra], "read while writing");
      end
      we <= 0;
      for (int a = 0; a < 64; a++) begin
        raddr <= 6'(a);
        @(posedge clk); #1;
        expect_rdata(model[a], "read back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
