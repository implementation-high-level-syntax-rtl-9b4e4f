// tb_transpose_buf: self-checking testbench of the 32 x 32 transposition
// buffer. Writes a block row by row and reads it column by column, then
// streams further blocks with alternating orientation, each written into
// the lines being read out of the previous one in the same cycle, and
// checks that every column read equals the transposed block.
module tb_transpose_buf;
  localparam int N = 32;
  localparam int W = 16;

  logic                clk = 0;
  logic                wr_en, wr_orient, rd_orient;
  logic [4:0]          wr_idx, rd_idx;
  logic signed [W-1:0] wr_data [N];
  logic signed [W-1:0] rd_data [N];

  int checks = 0, failures = 0;
  int blk [4][N][N];

  always #5 clk = ~clk;

  transpose_buf #(.N(N), .W(W)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) blk[b][r][c] = int'($signed(16'($urandom)));
    wr_en = 0; wr_orient = 0; rd_orient = 0; wr_idx = 0; rd_idx = 0;
    for (int i = 0; i < N; i++) wr_data[i] = '0;
    // Block 0 written alone, orientation 0.
    for (int r = 0; r < N; r++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(r);
      for (int c = 0; c < N; c++) wr_data[c] = W'(blk[0][r][c]);
    end
    @(negedge clk);
    wr_en = 0;
    // Blocks 1..3 written while the previous block is read.
    for (int b = 1; b <= 4; b++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        rd_orient = (b - 1) % 2 == 1;
        rd_idx    = 5'(i);
        wr_en     = (b < 4);
        wr_orient = b % 2 == 1;
        wr_idx    = 5'(i);
        if (b < 4)
          for (int c = 0; c < N; c++) wr_data[c] = W'(blk[b][i][c]);
        #1;
        for (int r = 0; r < N; r++) begin
          checks++;
          if (int'(rd_data[r]) != blk[b-1][r][i]) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH block=%0d col=%0d row=%0d got=%0d exp=%0d",
                       b - 1, i, r, rd_data[r], blk[b-1][r][i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
