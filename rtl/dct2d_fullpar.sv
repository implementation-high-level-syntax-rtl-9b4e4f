// dct2d_fullpar: 2-D HEVC forward integer DCT, full-parallel structure.
//
// Two reusable 1-D units (dct1d_reuse, N = 32 samples wide): the row unit
// does the horizontal pass of the incoming tile while the column unit does
// the vertical pass of the previous tile, both every cycle. They share one
// N x N transposition buffer (transpose_buf): while column c of tile t is
// read out, row c of tile t+1 is written, transposed, into the same array
// line, and the buffer orientation flips from tile to tile. Tiles are laid
// out as in dct2d_folded (one N x N block, or a grid of equal S x S blocks).
//
// Throughput is N samples (32) per cycle with no input stall: in_ready is
// constant high, because reading a stored tile never falls behind writing
// the next one. The first output column of a tile follows its last input
// row by two clocks (the tile becomes readable at the next edge, the column
// unit's result is registered), i.e. about N cycles after the tile's first
// row. A tile that is not followed by another one is still drained.
//
// Interface and scaling are those of dct2d_folded. The two 1-D units, the
// shared transposition buffer, the 32 samples per cycle and the initial
// latency of N cycles follow the design's description; the alternating
// orientation and the drain behaviour are this design's own choices.
module dct2d_fullpar
  import hevc_dct_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 16,
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  tsize_e                 in_size,
  input  logic signed [W-1:0]    in_row  [N],
  output logic                   out_valid,
  output tsize_e                 out_size,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic                   out_last,
  output logic signed [W-1:0]    out_col [N]
);
  localparam int unsigned WO = W + 11;
  localparam int unsigned CW = $clog2(N);

  // Write side (horizontal pass of the incoming tile).
  logic [CW-1:0]        wr_cnt;
  logic                 wr_orient;
  tsize_e               wr_size_q;
  tsize_e               wr_size;
  logic                 row_fire;
  // Read side (vertical pass of the stored tile).
  logic                 rd_pend;
  logic [CW-1:0]        rd_cnt;
  logic                 rd_orient;
  tsize_e               rd_size;

  logic signed [WO-1:0] row_y   [N];
  logic signed [WO-1:0] col_y   [N];
  logic signed [W-1:0]  row_s   [N];
  logic signed [W-1:0]  col_s   [N];
  logic signed [W-1:0]  buf_col [N];

  assign in_ready = 1'b1;
  assign row_fire = in_valid;
  assign wr_size  = (wr_cnt == '0) ? in_size : wr_size_q;

  dct1d_reuse #(.N(N), .WI(W), .WO(WO)) u_row (
    .x(in_row), .size(wr_size), .y(row_y)
  );

  dct1d_reuse #(.N(N), .WI(W), .WO(WO)) u_col (
    .x(buf_col), .size(rd_size), .y(col_y)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row_s[i] = W'(round_shift_sat(int'(row_y[i]),
                    shift_stage1(int'(wr_size), BIT_DEPTH), W));
      col_s[i] = W'(round_shift_sat(int'(col_y[i]),
                    shift_stage2(int'(rd_size)), W));
    end
  end

  transpose_buf #(.N(N), .W(W)) u_tbuf (
    .clk      (clk),
    .wr_en    (row_fire),
    .wr_orient(wr_orient),
    .wr_idx   (wr_cnt),
    .wr_data  (row_s),
    .rd_orient(rd_orient),
    .rd_idx   (rd_cnt),
    .rd_data  (buf_col)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      wr_orient <= 1'b0;
      wr_size_q <= TS_32;
      rd_pend   <= 1'b0;
      rd_cnt    <= '0;
      rd_orient <= 1'b0;
      rd_size   <= TS_32;
    end else begin
      if (rd_pend) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == CW'(N - 1)) rd_pend <= 1'b0;
      end
      if (row_fire) begin
        if (wr_cnt == '0) wr_size_q <= in_size;
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_cnt == CW'(N - 1)) begin
          // Tile complete: hand it to the read side, flip the layout.
          rd_pend   <= 1'b1;
          rd_cnt    <= '0;
          rd_orient <= wr_orient;
          rd_size   <= wr_size;
          wr_orient <= ~wr_orient;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_last  <= 1'b0;
      out_size  <= TS_32;
      for (int i = 0; i < N; i++) out_col[i] <= '0;
    end else begin
      out_valid <= rd_pend;
      out_idx   <= rd_cnt;
      out_last  <= rd_pend && (rd_cnt == CW'(N - 1));
      out_size  <= rd_size;
      if (rd_pend) out_col <= col_s;
    end
  end

  // A row may only overwrite an array line whose column of the stored tile
  // has been read (this cycle or earlier).
  assert property (@(posedge clk) disable iff (!rst_n)
                   (row_fire && rd_pend) |-> (rd_cnt >= wr_cnt))
    else $error("dct2d_fullpar: transposition buffer overrun");

endmodule
