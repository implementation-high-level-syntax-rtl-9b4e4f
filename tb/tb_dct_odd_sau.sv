// tb_dct_odd_sau: self-checking testbench of the reconfigurable odd-part
// block (N = 32). In full mode the outputs must equal the odd rows of the
// 32-point matrix applied to the inputs; in each reuse mode (4, 8, 16) they
// must equal independent S-point DCTs of consecutive input groups.
// Random and extreme inputs; the block is combinational.
module tb_dct_odd_sau;
  import hevc_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int N = 32;
  localparam int W = 27;

  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] v [N/2];
  tsize_e              size;
  logic signed [W-1:0] y [N/2];

  int checks = 0, failures = 0;

  dct_odd_sau #(.N(N), .W(W)) dut (.v(v), .size(size), .y(y));

  task automatic run(input longint in[32], input int log2s);
    longint e[32];
    for (int i = 0; i < N / 2; i++) v[i] = W'(in[i]);
    size = tsize_e'(log2s);
    @(posedge clk);
    #1;
    for (int m = 0; m < N / 2; m++) begin
      e[m] = 0;
      if (log2s == 5) begin
        for (int n = 0; n < N / 2; n++)
          e[m] += longint'(ref_coef(5, 2 * m + 1, n)) * in[n];
      end
    end
    if (log2s != 5) ref_dct1d(in, N / 2, log2s, e);
    for (int m = 0; m < N / 2; m++) begin
      checks++;
      if (longint'(y[m]) != e[m]) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH size=%0d m=%0d got=%0d exp=%0d", 1 << log2s, m, y[m], e[m]);
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint in[32];
    for (int log2s = 2; log2s <= 5; log2s++) begin
      for (int i = 0; i < 32; i++) in[i] = (i < 16) ? 65535 : 0;
      run(in, log2s);
      for (int i = 0; i < 32; i++) in[i] = (i < 16) ? -65536 : 0;
      run(in, log2s);
      for (int t = 0; t < 300; t++) begin
        for (int i = 0; i < 32; i++)
          in[i] = (i < 16) ? longint'($signed(17'($urandom))) : 0;
        run(in, log2s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
