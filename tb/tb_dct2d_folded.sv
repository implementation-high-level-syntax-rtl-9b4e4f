// tb_dct2d_folded: self-checking testbench of the folded 2-D integer DCT.
//
// Streams tiles of every transform size (one 32x32 block, or grids of
// 16x16, 8x8, 4x4 blocks) with random 9-bit residuals, plus a tile of
// extreme 16-bit values that drives the stage-1 saturation, and compares
// every output column with a direct-matrix 2-D reference. Checks the
// timing too: back-to-back tiles complete every 64 cycles (16 samples per
// cycle), a tile's first column follows its last row by 2 cycles, and
// in_ready drops for the 32 column cycles. Random input gaps exercise the
// handshake.
module tb_dct2d_folded;
  import hevc_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int N  = 32;
  localparam int W  = 16;
  localparam int BD = 8;
  localparam int NT = 14;

  logic                clk = 0, rst_n = 0;
  logic                in_valid, in_ready, out_valid, out_last;
  tsize_e              in_size, out_size;
  logic signed [W-1:0] in_row  [N];
  logic signed [W-1:0] out_col [N];
  logic [4:0]          out_idx;

  always #5 clk = ~clk;

  dct2d_folded #(.N(N), .W(W), .BIT_DEPTH(BD)) dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  longint tile_x [NT][32][32];
  longint tile_z [NT][32][32];
  int     tile_s [NT];
  longint last_row_cyc [NT];
  longint last_out_cyc [NT];
  int     stalls = 0;
  int     out_tile = 0;
  bit     gaps;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_tile >= NT) begin
        failures++;
        $display("unexpected output");
      end else begin
        checks++;
        if (int'(out_size) != tile_s[out_tile]) begin
          failures++;
          $display("size tile=%0d got=%0d", out_tile, out_size);
        end
        if (out_idx == 0) begin
          checks++;
          if (cyc != last_row_cyc[out_tile] + 2) begin
            failures++;
            $display("latency tile=%0d first column at %0d, last row at %0d",
                     out_tile, cyc, last_row_cyc[out_tile]);
          end
        end
        for (int r = 0; r < N; r++) begin
          checks++;
          if (longint'(out_col[r]) != tile_z[out_tile][r][out_idx]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH tile=%0d r=%0d c=%0d got=%0d exp=%0d", out_tile,
                       r, out_idx, out_col[r], tile_z[out_tile][r][out_idx]);
          end
        end
        checks++;
        if (out_last != (out_idx == 5'(N - 1))) begin
          failures++;
          $display("out_last wrong at idx %0d", out_idx);
        end
        if (out_last) begin
          last_out_cyc[out_tile] = cyc;
          out_tile++;
        end
      end
    end
    if (rst_n && in_valid && !in_ready) stalls++;
  end

  initial begin
    // Tiles: sizes 32,16,8,4 twice, then extreme values, then mixed.
    for (int t = 0; t < NT; t++) begin
      tile_s[t] = 5 - (t % 4);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          tile_x[t][r][c] = (t == 8) ? ((((r + c) % 2) == 0) ? 32767 : -32768)
                          : (t == 9) ? -32768
                          : longint'($signed(9'($urandom)));
      ref_dct2d(tile_x[t], N, tile_s[t], BD, tile_z[t]);
    end
    in_valid = 0;
    in_size  = TS_32;
    for (int i = 0; i < N; i++) in_row[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      gaps = (t >= 10);
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        while (gaps && ($urandom % 4 == 0)) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_size  = tsize_e'(r == 0 ? tile_s[t] : 3'($urandom % 4 + 2));
        for (int c = 0; c < N; c++) in_row[c] = W'(tile_x[t][r][c]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        last_row_cyc[t] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 0;
    wait (out_tile == NT);
    repeat (3) @(posedge clk);
    // Back-to-back tiles (0..9, no gaps) complete every 2N cycles.
    for (int t = 1; t < 10; t++) begin
      checks++;
      if (last_out_cyc[t] - last_out_cyc[t-1] != 2 * N) begin
        failures++;
        $display("rate: tile %0d ended %0d cycles after tile %0d", t,
                 last_out_cyc[t] - last_out_cyc[t-1], t - 1);
      end
    end
    checks++;
    if (stalls < N) begin
      failures++;
      $display("in_ready never held the input off (%0d)", stalls);
    end
    $display("tiles=%0d stall_cycles=%0d", out_tile, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
