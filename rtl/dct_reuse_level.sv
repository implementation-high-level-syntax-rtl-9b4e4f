// dct_reuse_level: one halving level of the reusable 1-D integer DCT
// (block length NL = 8, 16 or 32), used by dct1d_reuse.
//
// For a full-length transform (size == log2(NL)) the input adder unit
// forms sums e_out[n] = e_in[n] + e_in[NL-1-n] for the next, half-length
// level and differences for the odd-part block (dct_odd_sau); the level's
// outputs interleave the next level's results (even coefficients) with the
// odd-part results. For a shorter transform the adders are bypassed: the
// lower half of the samples goes to the next level, the upper half to the
// reconfigured odd-part block, and the two result halves are placed side
// by side. Combinational; all values are W bits (modular, see
// dct_odd_sau). The next level is asked for size_out.
module dct_reuse_level
  import hevc_dct_pkg::*;
#(
  parameter int unsigned NL = 32,
  parameter int unsigned W  = 27
) (
  input  logic signed [W-1:0] e_in   [NL],
  input  tsize_e              size_in,
  output logic signed [W-1:0] e_out  [NL/2],
  output tsize_e              size_out,
  input  logic signed [W-1:0] y_sub  [NL/2],
  output logic signed [W-1:0] y_out  [NL]
);
  localparam int L = $clog2(NL);

  logic                full;
  logic signed [W-1:0] b  [NL/2];
  logic signed [W-1:0] od [NL/2];

  assign full     = (int'(size_in) == L);
  assign size_out = full ? tsize_e'(L - 1) : size_in;

  // Input adder unit, bypassed for shorter transforms.
  always_comb begin
    for (int n = 0; n < NL / 2; n++) begin
      if (full) begin
        e_out[n] = e_in[n] + e_in[NL-1-n];
        b[n]     = e_in[n] - e_in[NL-1-n];
      end else begin
        e_out[n] = e_in[n];
        b[n]     = e_in[NL/2+n];
      end
    end
  end

  dct_odd_sau #(.N(NL), .W(W)) u_odd (.v(b), .size(size_in), .y(od));

  // Output ordering. Each branch assigns every output, so no element keeps
  // a value from an earlier statement.
  always_comb begin
    if (full) begin
      for (int m = 0; m < NL / 2; m++) begin
        y_out[2*m]   = y_sub[m];
        y_out[2*m+1] = od[m];
      end
    end else begin
      for (int m = 0; m < NL / 2; m++) begin
        y_out[m]      = y_sub[m];
        y_out[NL/2+m] = od[m];
      end
    end
  end

endmodule
