// tb_dct1d_reuse: self-checking testbench of the reusable 1-D integer DCT.
//
// Checks a few literal rows of the HEVC matrices (unit impulses), then
// random and extreme 16-bit inputs in every size mode (one 32-point, two
// 16-point, four 8-point, eight 4-point transforms) against a direct
// matrix product. The unit is combinational; a free-running clock only
// paces the stimulus and the watchdog.
module tb_dct1d_reuse;
  import hevc_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int N  = 32;
  localparam int WI = 16;
  localparam int WO = WI + 11;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [WI-1:0] x [N];
  tsize_e               size;
  logic signed [WO-1:0] y [N];

  int checks = 0, failures = 0;

  dct1d_reuse #(.N(N), .WI(WI), .WO(WO)) dut (.x(x), .size(size), .y(y));

  task automatic apply_and_check(input longint v[32], input int log2s);
    longint ref_y[32];
    for (int i = 0; i < N; i++) x[i] = WI'(v[i]);
    size = tsize_e'(log2s);
    @(posedge clk);
    #1;
    ref_dct1d(v, N, log2s, ref_y);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (longint'(y[i]) != ref_y[i]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH size=%0d i=%0d got=%0d exp=%0d", 1 << log2s, i, y[i], ref_y[i]);
      end
    end
  endtask

  // Literal matrix rows: an impulse at sample n gives column n of C_S.
  task automatic check_literal(input int log2s, input int k, input int row[]);
    longint v[32];
    for (int n = 0; n < row.size(); n++) begin
      for (int i = 0; i < 32; i++) v[i] = (i == n) ? 1 : 0;
      for (int i = 0; i < N; i++) x[i] = WI'(v[i]);
      size = tsize_e'(log2s);
      @(posedge clk);
      #1;
      checks++;
      if (int'(y[k]) != row[n]) begin
        failures++;
        $display("LITERAL size=%0d k=%0d n=%0d got=%0d exp=%0d", 1 << log2s, k, n, y[k], row[n]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v[32];
    check_literal(2, 1, '{83, 36, -36, -83});
    check_literal(3, 1, '{89, 75, 50, 18, -18, -50, -75, -89});
    check_literal(3, 3, '{75, -18, -89, -50, 50, 89, 18, -75});
    check_literal(4, 1, '{90, 87, 80, 70, 57, 43, 25, 9, -9, -25, -43, -57, -70, -80, -87, -90});
    check_literal(5, 1, '{90, 90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4});
    check_literal(5, 31, '{4, -13, 22, -31, 38, -46, 54, -61, 67, -73, 78, -82, 85, -88, 90, -90});
    for (int log2s = 2; log2s <= 5; log2s++) begin
      // Extremes: all minimum, all maximum, alternating.
      for (int i = 0; i < 32; i++) v[i] = -32768;
      apply_and_check(v, log2s);
      for (int i = 0; i < 32; i++) v[i] = 32767;
      apply_and_check(v, log2s);
      for (int i = 0; i < 32; i++) v[i] = (i % 2 == 0) ? 32767 : -32768;
      apply_and_check(v, log2s);
      for (int t = 0; t < 200; t++) begin
        for (int i = 0; i < 32; i++)
          v[i] = (t % 2 == 0) ? longint'($signed(16'($urandom)))
                              : longint'($signed(9'($urandom)));
        apply_and_check(v, log2s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
