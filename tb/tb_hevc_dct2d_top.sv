// tb_hevc_dct2d_top: end-to-end testbench of the top, at its default
// parameters (32-sample datapath, 16-bit words, 8-bit video).
//
// Both engines are fed the same sequence of residual tiles at once: every
// transform size (32x32, 16x16, 8x8, 4x4 grids), random 9-bit residuals,
// one tile of extreme values that saturates the first pass, a stretch of
// back-to-back tiles and a stretch with random input gaps. Every output
// column is compared with a direct-matrix reference. It counts how often
// each mechanism occurred and fails any that never did: each transform size
// on each engine, the folded engine holding the input off during its
// column phase, the full-parallel engine writing a tile while reading the
// previous one, and a stored tile draining with no input. It also checks
// the tile rates: 64 cycles per tile folded, 32 full-parallel.
module tb_hevc_dct2d_top;
  import hevc_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int N  = 32;
  localparam int W  = 16;
  localparam int BD = 8;
  localparam int NT = 16;
  localparam int NB = 10;   // first NB tiles are sent back to back

  logic                clk = 0, rst_n = 0;
  logic                f_in_valid, f_in_ready, f_out_valid, f_out_last;
  logic                p_in_valid, p_in_ready, p_out_valid, p_out_last;
  tsize_e              f_in_size, f_out_size, p_in_size, p_out_size;
  logic signed [W-1:0] f_in_row [N], f_out_col [N], p_in_row [N], p_out_col [N];
  logic [4:0]          f_out_idx, p_out_idx;

  always #5 clk = ~clk;

  hevc_dct2d_top dut (.*);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  longint tile_x [NT][32][32];
  longint tile_z [NT][32][32];
  int     tile_s [NT];
  longint f_end [NT], p_end [NT];
  int     f_tile = 0, p_tile = 0;
  int     f_size_seen [6], p_size_seen [6];
  int     f_stalls = 0, p_overlap = 0, p_drain = 0, sat_tiles = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(input string eng, input int t, input tsize_e sz,
                           input logic [4:0] idx, input logic last,
                           input logic signed [W-1:0] col [N]);
    checks++;
    if (int'(sz) != tile_s[t] || last != (idx == 5'(N - 1))) begin
      failures++;
      $display("%s tile %0d: size %0d last %0b at idx %0d", eng, t, sz, last, idx);
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (longint'(col[r]) != tile_z[t][r][idx]) begin
        failures++;
        if (failures < 10)
          $display("%s MISMATCH tile=%0d r=%0d c=%0d got=%0d exp=%0d", eng, t, r,
                   idx, col[r], tile_z[t][r][idx]);
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (f_out_valid && f_tile < NT) begin
        check_col("folded", f_tile, f_out_size, f_out_idx, f_out_last, f_out_col);
        if (f_out_last) begin
          f_end[f_tile] = cyc;
          f_size_seen[tile_s[f_tile]]++;
          f_tile++;
        end
      end
      if (p_out_valid && p_tile < NT) begin
        check_col("fullpar", p_tile, p_out_size, p_out_idx, p_out_last, p_out_col);
        if (p_out_last) begin
          p_end[p_tile] = cyc;
          p_size_seen[tile_s[p_tile]]++;
          p_tile++;
        end
      end
      if (f_in_valid && !f_in_ready) f_stalls++;
      if (p_in_valid && p_out_valid) p_overlap++;
      if (!p_in_valid && p_out_valid) p_drain++;
    end
  end

  // One driver per engine: rows of all tiles, gaps after tile NB-1.
  task automatic drive_folded();
    for (int t = 0; t < NT; t++)
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        while (t >= NB && ($urandom % 3 == 0)) begin
          f_in_valid = 0;
          @(negedge clk);
        end
        f_in_valid = 1;
        f_in_size  = tsize_e'(tile_s[t]);
        for (int c = 0; c < N; c++) f_in_row[c] = W'(tile_x[t][r][c]);
        @(posedge clk);
        while (!f_in_ready) @(posedge clk);
      end
    @(negedge clk);
    f_in_valid = 0;
  endtask

  task automatic drive_fullpar();
    for (int t = 0; t < NT; t++) begin
      // A pause after the last back-to-back tile lets it drain on its own.
      if (t == NB) repeat (2 * N) begin
        @(negedge clk);
        p_in_valid = 0;
      end
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        while (t >= NB && ($urandom % 3 == 0)) begin
          p_in_valid = 0;
          @(negedge clk);
        end
        p_in_valid = 1;
        p_in_size  = tsize_e'(tile_s[t]);
        for (int c = 0; c < N; c++) p_in_row[c] = W'(tile_x[t][r][c]);
        @(posedge clk);
        while (!p_in_ready) @(posedge clk);
      end
    end
    @(negedge clk);
    p_in_valid = 0;
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      tile_s[t] = 2 + ($urandom % 4);
      if (t < 4) tile_s[t] = 5 - t;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          tile_x[t][r][c] = (t == 5) ? ((((r + c) % 2) == 0) ? 32767 : -32768)
                          : longint'($signed(9'($urandom)));
      ref_dct2d(tile_x[t], N, tile_s[t], BD, tile_z[t]);
    end
    // Tile 5 is extreme; its first pass saturates.
    sat_tiles = 1;
    for (int i = 0; i < 6; i++) begin f_size_seen[i] = 0; p_size_seen[i] = 0; end
    f_in_valid = 0; p_in_valid = 0;
    f_in_size = TS_32; p_in_size = TS_32;
    for (int c = 0; c < N; c++) begin f_in_row[c] = '0; p_in_row[c] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fork
      drive_folded();
      drive_fullpar();
    join
    wait (f_tile == NT && p_tile == NT);
    repeat (3) @(posedge clk);
    for (int t = 1; t < NB; t++) begin
      checks += 2;
      if (f_end[t] - f_end[t-1] != 2 * N) begin
        failures++;
        $display("folded rate: tile %0d after %0d cycles", t, f_end[t] - f_end[t-1]);
      end
      if (p_end[t] - p_end[t-1] != N) begin
        failures++;
        $display("fullpar rate: tile %0d after %0d cycles", t, p_end[t] - p_end[t-1]);
      end
    end
    for (int s = 2; s <= 5; s++) begin
      checks += 2;
      $display("size %0d: folded tiles %0d, full-parallel tiles %0d", 1 << s,
               f_size_seen[s], p_size_seen[s]);
      if (f_size_seen[s] == 0 || p_size_seen[s] == 0) begin
        failures++;
        $display("size %0d never exercised", 1 << s);
      end
    end
    $display("folded input stalls %0d, full-parallel overlapped cycles %0d, drain cycles %0d",
             f_stalls, p_overlap, p_drain);
    checks += 3;
    if (f_stalls == 0) begin failures++; $display("no folded stall"); end
    if (p_overlap == 0) begin failures++; $display("no full-parallel overlap"); end
    if (p_drain == 0) begin failures++; $display("no full-parallel drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
