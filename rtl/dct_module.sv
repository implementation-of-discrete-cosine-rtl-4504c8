// dct_module: 2-D DCT engine for one 8 x 8 block by row-column decomposition.
//
// Two dct1d units with a transpose_buffer between them. The row unit takes
// one image row at a time; its eight results go both to the row-result memory
// (mem_out, through we2/addr2/data_out1, address r*8+l) and into row r of the
// transpose buffer. When all eight rows are done, flag rises and the column
// unit takes the buffer one column at a time; its eight results are the 2-D
// coefficients X(k,l) of column l, written to mem_out2 (we3/addr3/data_out2)
// at address k*8+l. Then done rises. Coefficients keep the scale factors of
// the Arai flow graph in both directions (see dct1d).
//
// Sequence per row r:   ROW_RD  8 clocks, addr1 = r*8+0..7 (pixels arrive
//                                one clock later on data_in)
//                       ROW_WAIT until the row unit's result (4 clocks)
//                       ROW_WR  8 clocks, one mem_out write per clock
// Sequence per column l: COL_RD 1 clock (whole column from the buffer)
//                       COL_WAIT until the column unit's result (3 clocks)
//                       COL_WR  8 clocks, one mem_out2 write per clock
// A block therefore takes 1 + 8*20 + 8*12 = 257 clocks from the enable
// request to done. enable is a start request taken only while idle; flag and
// done stay high until the next start.
//
// The two-unit structure, the transpose buffer, the row-then-column order and
// the memory names follow the document. The read/compute/write sequencing,
// the meaning of flag (row pass complete) and the done/busy outputs are this
// design's choices.
module dct_module #(
  parameter int PIX_W = dct_pkg::PIX_W,
  parameter int OUT_W = dct_pkg::OUT_W,
  parameter int CF    = dct_pkg::CF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  // input block memory read port
  output logic [5:0]              addr1,
  input  logic signed [PIX_W:0]   data_in,
  // row-pass result memory write port
  output logic                    we2,
  output logic [5:0]              addr2,
  output logic signed [OUT_W-1:0] data_out1,
  // 2-D coefficient memory write port
  output logic                    we3,
  output logic [5:0]              addr3,
  output logic signed [OUT_W-1:0] data_out2,
  // status
  output logic                    flag,
  output logic                    done,
  output logic                    busy
);
  localparam int IW1 = PIX_W + 1;   // row unit input width
  localparam int TW  = IW1 + 4;     // row unit output / column unit input

  typedef enum logic [2:0] {
    IDLE, ROW_RD, ROW_WAIT, ROW_WR, COL_RD, COL_WAIT, COL_WR
  } state_t;

  state_t     state;
  logic [2:0] idx;      // row or column being processed
  logic [2:0] cnt;      // element counter within a row/column

  // ---- read pipeline from mem_in ----
  logic       rd_v;     // a read was issued last clock
  logic [2:0] rd_i;     // its element index
  logic signed [IW1-1:0] gather [7];

  logic                  row_in_v, row_out_v;
  logic signed [IW1-1:0] row_a [8];
  logic signed [TW-1:0]  row_s [8];

  logic                  col_in_v, col_out_v;
  logic signed [TW-1:0]  col_a [8];
  logic signed [OUT_W-1:0] col_s [8];

  logic signed [OUT_W-1:0] res [8];  // results being written out

  // the eighth pixel goes straight from the memory into the row unit
  always_comb begin
    for (int i = 0; i < 7; i++) row_a[i] = gather[i];
    row_a[7] = data_in;
  end
  assign row_in_v = rd_v && (rd_i == 3'd7);

  always_ff @(posedge clk)
    if (rd_v && rd_i != 3'd7) gather[rd_i] <= data_in;

  dct1d #(.IW(IW1), .OW(TW), .CF(CF)) u_row (
    .clk, .rst_n, .in_valid(row_in_v), .a(row_a),
    .out_valid(row_out_v), .s(row_s)
  );

  transpose_buffer #(.W(TW)) u_tbuf (
    .clk, .wr_en(row_out_v), .wr_row(idx), .wr_data(row_s),
    .rd_col(idx), .rd_data(col_a)
  );

  assign col_in_v = (state == COL_RD);

  dct1d #(.IW(TW), .OW(OUT_W), .CF(CF)) u_col (
    .clk, .rst_n, .in_valid(col_in_v), .a(col_a),
    .out_valid(col_out_v), .s(col_s)
  );

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      idx   <= '0;
      cnt   <= '0;
      rd_v  <= 1'b0;
      rd_i  <= '0;
      flag  <= 1'b0;
      done  <= 1'b0;
    end else begin
      rd_v <= (state == ROW_RD);
      rd_i <= cnt;
      unique case (state)
        IDLE: if (enable) begin
          state <= ROW_RD;
          idx   <= '0;
          cnt   <= '0;
          flag  <= 1'b0;
          done  <= 1'b0;
        end
        ROW_RD: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= ROW_WAIT;
        end
        ROW_WAIT: if (row_out_v) state <= ROW_WR;
        ROW_WR: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) begin
            idx <= idx + 3'd1;
            if (idx == 3'd7) begin
              flag  <= 1'b1;
              state <= COL_RD;
            end else begin
              state <= ROW_RD;
            end
          end
        end
        COL_RD: state <= COL_WAIT;
        COL_WAIT: if (col_out_v) state <= COL_WR;
        COL_WR: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) begin
            idx <= idx + 3'd1;
            if (idx == 3'd7) begin
              done  <= 1'b1;
              state <= IDLE;
            end else begin
              state <= COL_RD;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // result holding register, loaded when a unit delivers
  always_ff @(posedge clk)
    if (row_out_v)
      for (int k = 0; k < 8; k++) res[k] <= OUT_W'(row_s[k]);
    else if (col_out_v)
      res <= col_s;

  assign busy      = (state != IDLE);
  assign addr1     = {idx, cnt};
  assign we2       = (state == ROW_WR);
  assign addr2     = {idx, cnt};
  assign data_out1 = res[cnt];
  assign we3       = (state == COL_WR);
  assign addr3     = {cnt, idx};      // k*8 + l
  assign data_out2 = res[cnt];

  // the two units never deliver in the same clock, and the result memories
  // are never written together
  assert property (@(posedge clk) disable iff (!rst_n) !(row_out_v && col_out_v));
  assert property (@(posedge clk) disable iff (!rst_n) !(we2 && we3));
  // a row result arrives only while the controller waits for it
  assert property (@(posedge clk) disable iff (!rst_n) row_out_v |-> state == ROW_WAIT);
  assert property (@(posedge clk) disable iff (!rst_n) col_out_v |-> state == COL_WAIT);

endmodule
