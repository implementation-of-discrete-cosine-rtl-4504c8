// tb_mem_in: loads a block of random pixels, reads every address back and
// checks the one-clock read latency, the zero extension to 9 bits and that a
// read in the clock of a write to the same address returns the old pixel.
module tb_mem_in;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       we = 0;
  logic [5:0] waddr = 0, addr = 0;
  logic [7:0] wdata = 0;
  logic signed [8:0] dout;
  int model [64];

  mem_in dut (.clk, .we, .waddr, .wdata, .addr, .dout);

  task automatic expect_dout(int exp, string what);
    checks++;
    if (int'(dout) != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, dout, exp);
    end
  endtask

  initial begin
    // contents start at zero
    for (int a = 0; a < 64; a++) begin
      addr <= 6'(a);
      @(posedge clk); #1;
      expect_dout(0, "initial");
    end
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 64; a++) begin
        model[a] = int'($urandom % 256);
        if (round == 3) model[a] = (a % 2) ? 255 : 128;
        we <= 1; waddr <= 6'(a); wdata <= 8'(model[a]);
        @(posedge clk);
      end
      we <= 0;
      for (int a = 63; a >= 0; a--) begin
        addr <= 6'(a);
        @(posedge clk); #1;
        expect_dout(model[a], "read");
      end
    end
    // read during write: old value
    addr <= 6'd9; we <= 1; waddr <= 6'd9; wdata <= 8'(model[9] ^ 8'h5a);
    @(posedge clk); #1;
    expect_dout(model[9], "read during write");
    we <= 0;
    @(posedge clk); #1;
    expect_dout(model[9] ^ 32'h5a, "after write");
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
