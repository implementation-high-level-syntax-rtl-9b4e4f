// hevc_dct2d_top: the two 2-D HEVC forward integer DCT engines built from
// the reusable 1-D unit, side by side on one clock and reset.
//
//   f_*  folded engine (dct2d_folded): one 1-D unit shared by both passes,
//        a 32 x 32 tile every 64 cycles, 16 samples per cycle.
//   p_*  full-parallel engine (dct2d_fullpar): one 1-D unit per pass, a
//        32 x 32 tile every 32 cycles, 32 samples per cycle.
//
// The two engines are alternative organisations of the same transform and
// share no logic; each has its own row input (valid/ready, size sampled
// with a tile's first row) and its own coefficient-column output (see the
// engines for the exact timing). Tiles are N x N residuals holding one
// N x N block or a grid of equal smaller blocks (4, 8 or 16).
module hevc_dct2d_top
  import hevc_dct_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = 16,
  parameter int unsigned BIT_DEPTH = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Folded engine.
  input  logic                   f_in_valid,
  output logic                   f_in_ready,
  input  tsize_e                 f_in_size,
  input  logic signed [W-1:0]    f_in_row  [N],
  output logic                   f_out_valid,
  output tsize_e                 f_out_size,
  output logic [$clog2(N)-1:0]   f_out_idx,
  output logic                   f_out_last,
  output logic signed [W-1:0]    f_out_col [N],
  // Full-parallel engine.
  input  logic                   p_in_valid,
  output logic                   p_in_ready,
  input  tsize_e                 p_in_size,
  input  logic signed [W-1:0]    p_in_row  [N],
  output logic                   p_out_valid,
  output tsize_e                 p_out_size,
  output logic [$clog2(N)-1:0]   p_out_idx,
  output logic                   p_out_last,
  output logic signed [W-1:0]    p_out_col [N]
);

  dct2d_folded #(.N(N), .W(W), .BIT_DEPTH(BIT_DEPTH)) u_folded (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (f_in_valid),
    .in_ready (f_in_ready),
    .in_size  (f_in_size),
    .in_row   (f_in_row),
    .out_valid(f_out_valid),
    .out_size (f_out_size),
    .out_idx  (f_out_idx),
    .out_last (f_out_last),
    .out_col  (f_out_col)
  );

  dct2d_fullpar #(.N(N), .W(W), .BIT_DEPTH(BIT_DEPTH)) u_fullpar (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (p_in_valid),
    .in_ready (p_in_ready),
    .in_size  (p_in_size),
    .in_row   (p_in_row),
    .out_valid(p_out_valid),
    .out_size (p_out_size),
    .out_idx  (p_out_idx),
    .out_last (p_out_last),
    .out_col  (p_out_col)
  );

endmodule
