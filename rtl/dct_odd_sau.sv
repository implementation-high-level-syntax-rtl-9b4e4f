// dct_odd_sau: reconfigurable odd-part block of the reusable N-point
// integer DCT (N = 8, 16 or 32).
//
// In full mode (size == log2(N)) it produces the odd-indexed outputs of an
// N-point HEVC DCT from the N/2 butterfly differences v[n] = x[n] - x[N-1-n]:
//   y[m] = sum_n C_N[2m+1][n] * v[n],   m = 0 .. N/2-1.
// In reuse mode (a smaller size S) the same block instead transforms its
// N/2 inputs as N/(2S) independent S-point DCTs, y = blockdiag(C_S) * v, so
// that the enclosing unit can run several short transforms side by side.
// Every coefficient is a compile-time constant, so each product is a
// shift-add (constant) multiplier; the size input only selects between the
// products. Purely combinational. All arithmetic is done in W bits: the
// caller chooses W wide enough for the final result, and two's-complement
// wrap-around in partial sums then cancels out.
//
// The even/odd split and the multiplier-free constant products follow the
// design's description; how the odd part is reconfigured for shorter
// transforms is this design's own choice.
module dct_odd_sau
  import hevc_dct_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 27
) (
  input  logic signed [W-1:0] v    [N/2],
  input  tsize_e              size,
  output logic signed [W-1:0] y    [N/2]
);
  localparam int LOG2N = $clog2(N);

  // Coefficient of output m, input n for transform size log2s.
  function automatic int kcoef(input int log2s, input int m, input int n);
    int s;
    if (log2s == LOG2N) return cmat(LOG2N, 2 * m + 1, n);
    s = 1 << log2s;
    if ((m / s) != (n / s)) return 0;
    return cmat(log2s, m % s, n % s);
  endfunction

  // Per (m, n): the four constant products, selected by the size.
  logic signed [W-1:0] prod [N/2][N/2];

  for (genvar m = 0; m < N / 2; m++) begin : g_m
    for (genvar n = 0; n < N / 2; n++) begin : g_n
      localparam int K4  = kcoef(2, m, n);
      localparam int K8  = kcoef(3, m, n);
      localparam int K16 = kcoef(4, m, n);
      localparam int KN  = kcoef(LOG2N, m, n);
      always_comb begin
        unique case (size)
          TS_4:    prod[m][n] = W'(v[n] * K4);
          TS_8:    prod[m][n] = W'(v[n] * K8);
          TS_16:   prod[m][n] = W'(v[n] * K16);
          default: prod[m][n] = W'(v[n] * KN);
        endcase
      end
    end
  end

  // Adder trees (written as sums; synthesis builds the trees).
  always_comb begin
    for (int m = 0; m < N / 2; m++) begin
      logic signed [W-1:0] acc;
      acc = '0;
      for (int n = 0; n < N / 2; n++) acc = acc + prod[m][n];
      y[m] = acc;
    end
  end

endmodule
