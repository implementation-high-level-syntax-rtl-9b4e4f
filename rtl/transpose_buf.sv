// transpose_buf: N x N transposition buffer between the two 1-D passes of
// the 2-D integer DCT.
//
// A register array of N*N words. Writes take one row of a block per clock,
// reads return one column of a block per clock (combinationally), so a block
// comes out transposed. An orientation bit on each side says how a block is
// laid out: with 0, row r of the block is row r of the array; with 1, it is
// column r of the array. A read sees the array before the same cycle's
// write, so a new block can be written, with the other orientation, into
// exactly the array lines being read out of the previous block; alternating
// the orientation from block to block lets one array serve a pipeline that
// reads and writes every cycle (the full-parallel structure).
//
// Ports: wr_en/wr_orient/wr_idx/wr_data (written at the rising edge),
// rd_orient/rd_idx/rd_data (combinational). No reset: contents are defined
// by writes before they are read. The buffer being shared by both passes
// follows the design's description; the register implementation and the
// orientation scheme are this design's own choices.
module transpose_buf #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 16
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_orient,
  input  logic [$clog2(N)-1:0]     wr_idx,
  input  logic signed [W-1:0]      wr_data [N],
  input  logic                     rd_orient,
  input  logic [$clog2(N)-1:0]     rd_idx,
  output logic signed [W-1:0]      rd_data [N]
);
  logic signed [W-1:0] mem [N][N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < N; i++) begin
        if (wr_orient) mem[i][wr_idx] <= wr_data[i];
        else           mem[wr_idx][i] <= wr_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      rd_data[i] = rd_orient ? mem[rd_idx][i] : mem[i][rd_idx];
  end

endmodule
