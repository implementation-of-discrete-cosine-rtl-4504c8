// tb_transpose_buffer: writes eight rows of distinct random words, then reads
// every column and checks that element r of column l is the word written as
// element l of row r. Repeated over several rounds, with rows written in a
// shuffled order, so a wrong row/column index shows.
module tb_transpose_buffer;
  localparam int W = 13;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                wr_en = 0;
  logic [2:0]          wr_row = 0, rd_col = 0;
  logic signed [W-1:0] wr_data [8];
  logic signed [W-1:0] rd_data [8];
  int                  model [8][8];

  transpose_buffer #(.W(W)) dut (.clk, .wr_en, .wr_row, .wr_data, .rd_col, .rd_data);

  initial begin
    for (int l = 0; l < 8; l++) wr_data[l] = '0;
    for (int round = 0; round < 20; round++) begin
      int order [8];
      for (int i = 0; i < 8; i++) order[i] = (i * 5 + round) % 8;
      for (int i = 0; i < 8; i++) begin
        wr_en  <= 1;
        wr_row <= 3'(order[i]);
        for (int l = 0; l < 8; l++) begin
          int v;
          v = int'($urandom % 8192) - 4096;
          model[order[i]][l] = v;
          wr_data[l] <= W'(v);
        end
        @(posedge clk);
      end
      wr_en <= 0;
      // a write with wr_en low must change nothing
      wr_row <= 3'd2;
      for (int l = 0; l < 8; l++) wr_data[l] <= W'(-1);
      @(posedge clk);
      for (int l = 0; l < 8; l++) begin
        rd_col <= 3'(l);
        @(posedge clk);
        #1;
        for (int r = 0; r < 8; r++) begin
          checks++;
          if (int'(rd_data[r]) != model[r][l]) begin
            failures++;
            $display("FAIL round %0d col %0d row %0d: %0d, expected %0d",
                     round, l, r, rd_data[r], model[r][l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
