// dct2d_folded: 2-D HEVC forward integer DCT, folded structure.
//
// One reusable 1-D unit (dct1d_reuse, N = 32 samples wide) is time-shared
// by the horizontal and the vertical pass, with a transposition buffer
// between them. Data moves in tiles of N x N residuals: a tile is one
// N x N transform block, or a grid of (N/S)^2 blocks of size S x S placed
// side by side, all of the same size S. Per tile:
//   row phase, N accepted cycles: input row r goes through the 1-D unit
//     (N/S horizontal S-point DCTs), is scaled by the first-stage shift
//     and written into buffer row r;
//   column phase, N cycles: buffer column c goes through the same 1-D unit
//     (N/S vertical DCTs), is scaled by the second-stage shift and
//     registered to the output.
// A 32 x 32 tile thus takes 2N = 64 cycles, 16 samples per cycle on
// average, for every transform size.
//
// Interface: in_valid/in_ready handshake per row (in_ready is low during the
// column phase); in_size is sampled with row 0 and holds for the tile.
// The output has no back-pressure: out_valid is high for one cycle per
// coefficient column, out_col[i] being coefficient (i mod S) in vertical
// frequency of block row i/S, column out_idx of the tile (horizontal
// frequency out_idx mod S of block column out_idx/S); out_last marks column
// N-1. Output column c appears one clock after the column-phase cycle that
// reads it, so the first column of a tile follows its last input row by
// two clocks.
//
// Scaling uses the HEVC reference encoder's shifts (stage 1:
// log2(S) - 1 + BIT_DEPTH - 8, stage 2: log2(S) + 6, both rounded),
// saturating to W-bit words. The folded structure, the 64-cycle tile time
// and the 16-bit words follow the design's description; the tiling of
// smaller blocks, the handshake and the saturation are this design's own.
module dct2d_folded
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

  typedef enum logic {PH_ROW, PH_COL} phase_e;

  phase_e               phase;
  logic [CW-1:0]        cnt;
  tsize_e               tile_size;
  tsize_e               cur_size;
  logic                 row_fire;

  logic signed [W-1:0]  unit_in  [N];
  logic signed [WO-1:0] unit_out [N];
  logic signed [W-1:0]  scaled   [N];
  logic signed [W-1:0]  buf_col  [N];

  assign in_ready = (phase == PH_ROW);
  assign row_fire = in_valid && in_ready;
  // The size of row 0 is used directly; later rows use the latched size.
  assign cur_size = (phase == PH_ROW && cnt == '0) ? in_size : tile_size;

  always_comb begin
    for (int i = 0; i < N; i++)
      unit_in[i] = (phase == PH_ROW) ? in_row[i] : buf_col[i];
  end

  dct1d_reuse #(.N(N), .WI(W), .WO(WO)) u_dct (
    .x(unit_in), .size(cur_size), .y(unit_out)
  );

  always_comb begin
    int sh;
    sh = (phase == PH_ROW) ? shift_stage1(int'(cur_size), BIT_DEPTH)
                           : shift_stage2(int'(cur_size));
    for (int i = 0; i < N; i++)
      scaled[i] = W'(round_shift_sat(int'(unit_out[i]), sh, W));
  end

  transpose_buf #(.N(N), .W(W)) u_tbuf (
    .clk      (clk),
    .wr_en    (row_fire),
    .wr_orient(1'b0),
    .wr_idx   (cnt),
    .wr_data  (scaled),
    .rd_orient(1'b0),
    .rd_idx   (cnt),
    .rd_data  (buf_col)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_ROW;
      cnt       <= '0;
      tile_size <= TS_32;
    end else begin
      if (phase == PH_ROW) begin
        if (row_fire) begin
          if (cnt == '0) tile_size <= in_size;
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) phase <= PH_COL;
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(N - 1)) phase <= PH_ROW;
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
      out_valid <= (phase == PH_COL);
      out_idx   <= cnt;
      out_last  <= (phase == PH_COL) && (cnt == CW'(N - 1));
      out_size  <= tile_size;
      if (phase == PH_COL) out_col <= scaled;
    end
  end

endmodule
