// dct1d_reuse: reusable 1-D HEVC integer DCT of length N (4, 8, 16, 32).
//
// It takes N samples per call and, depending on `size`, computes one
// N-point DCT or N/S independent S-point DCTs on consecutive groups of S
// samples (S = 4 .. N), so the unit handles N samples per cycle whatever the
// transform size. Purely combinational; outputs are in natural frequency
// order within each group (y[g*S + k] is coefficient k of group g).
//
// Structure: one dct_reuse_level per halving, following the even/odd
// factorisation of the HEVC core transform. A level's input adder unit forms
// a[n] = x[n] + x[N-1-n] and b[n] = x[n] - x[N-1-n]; the next level, an
// (N/2)-point reusable DCT of a[], gives the even-indexed outputs and the
// odd-part block (dct_odd_sau) gives the odd ones from b[]. For a size below
// N the adder unit is bypassed by multiplexers: the lower half of the
// samples goes to the (N/2)-point unit and the upper half to the
// reconfigured odd-part block, and the outputs are not interleaved. The
// 4-point base case is the HEVC 4-point butterfly
// (64, 83, 36). No rounding is done here: the output is the exact
// matrix product, WO bits wide (WI + 11 bits hold any 32-point result).
//
// The reuse scheme (same throughput for every size) and the 16-bit input
// word follow the design's description; the mux placement is this design's
// own choice.
module dct1d_reuse
  import hevc_dct_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned WI = 16,
  parameter int unsigned WO = WI + 11
) (
  input  logic signed [WI-1:0] x    [N],
  input  tsize_e               size,
  output logic signed [WO-1:0] y    [N]
);
  localparam int LOG2N = $clog2(N);

  // Samples entering, and results leaving, the level of length 2**L.
  logic signed [WO-1:0] e5 [32], e4 [16], e3 [8], e2 [4];
  logic signed [WO-1:0] y5 [32], y4 [16], y3 [8], y2 [4];
  tsize_e               s5, s4, s3;

  if (LOG2N == 5) begin : g_in5
    always_comb for (int n = 0; n < 32; n++) e5[n] = WO'(x[n]);
    assign s5 = size;
    assign y  = y5;
  end
  if (LOG2N == 4) begin : g_in4
    always_comb for (int n = 0; n < 16; n++) e4[n] = WO'(x[n]);
    assign s4 = size;
    assign y  = y4;
  end
  if (LOG2N == 3) begin : g_in3
    always_comb for (int n = 0; n < 8; n++) e3[n] = WO'(x[n]);
    assign s3 = size;
    assign y  = y3;
  end
  if (LOG2N == 2) begin : g_in2
    always_comb for (int n = 0; n < 4; n++) e2[n] = WO'(x[n]);
    assign y  = y2;
  end

  if (LOG2N >= 5) begin : g_l5
    dct_reuse_level #(.NL(32), .W(WO)) u_lvl (
      .e_in(e5), .size_in(s5), .e_out(e4), .size_out(s4), .y_sub(y4), .y_out(y5)
    );
  end
  if (LOG2N >= 4) begin : g_l4
    dct_reuse_level #(.NL(16), .W(WO)) u_lvl (
      .e_in(e4), .size_in(s4), .e_out(e3), .size_out(s3), .y_sub(y3), .y_out(y4)
    );
  end
  if (LOG2N >= 3) begin : g_l3
    dct_reuse_level #(.NL(8), .W(WO)) u_lvl (
      .e_in(e3), .size_in(s3), .e_out(e2), .size_out(), .y_sub(y2), .y_out(y3)
    );
  end

  // 4-point base: even part 64*(a0 +- a1), odd part 83/36 rotation.
  always_comb begin
    logic signed [WO-1:0] a0, a1, b0, b1;
    a0 = e2[0] + e2[3];
    a1 = e2[1] + e2[2];
    b0 = e2[0] - e2[3];
    b1 = e2[1] - e2[2];
    y2[0] = (a0 + a1) <<< 6;
    y2[2] = (a0 - a1) <<< 6;
    y2[1] = WO'(b0 * 83 + b1 * 36);
    y2[3] = WO'(b0 * 36 - b1 * 83);
  end

endmodule
