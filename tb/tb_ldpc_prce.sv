// tb_ldpc_prce: checks the parallel RCE on a small quasi-cyclic matrix
// (4 circulant rows x 2 columns of 16x16 circulants, LA = 2, LM = 4) against
// a direct GF(2) vector-matrix product. Covers several frames, accumulator
// clearing by reset_prce, hold when mac_en is low and freeze when ce is low.
module tb_ldpc_prce;
  localparam int NCOL = 2, M = 16, LA = 2, LM = 4, NROWS = 4;
  localparam int K = NROWS * M;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ce, mac_en, reset_prce;
  logic [LA-1:0][LM-1:0]           s_feed;
  logic [LA-1:0][NCOL-1:0][M-1:0]  g;
  logic [NCOL-1:0][M-1:0]          parity;

  ldpc_prce #(.NCOL(NCOL), .M(M), .LA(LA), .LM(LM)) dut (.*);

  logic [M-1:0] gt [NROWS][NCOL];
  logic         u [K];
  int checks = 0, failures = 0;

  initial begin
    ce = 1; mac_en = 0; reset_prce = 0; s_feed = '0; g = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      logic exp [NCOL][M];
      for (int r = 0; r < NROWS; r++)
        for (int c = 0; c < NCOL; c++) gt[r][c] = M'($urandom);
      for (int i = 0; i < K; i++) u[i] = 1'($urandom);
      for (int c = 0; c < NCOL; c++)
        for (int j = 0; j < M; j++) begin
          exp[c][j] = 1'b0;
          for (int i = 0; i < K; i++)
            exp[c][j] ^= u[i] & gt[i / M][c][(j - i % M + M) % M];
        end
      // clear, then feed group by group; insert idle and frozen cycles
      @(negedge clk); reset_prce = 1; @(negedge clk); reset_prce = 0;
      for (int grp = 0; grp < NROWS / LA; grp++)
        for (int t = 0; t < M / LM; t++) begin
          for (int b = 0; b < LA; b++) begin
            g[b] = '0;
            for (int c = 0; c < NCOL; c++) g[b][c] = gt[grp*LA + b][c];
            for (int k = 0; k < LM; k++) s_feed[b][LM-1-k] = u[(grp*LA + b)*M + t*LM + k];
          end
          mac_en = 1;
          ce = ($urandom_range(0, 5) != 0);
          @(negedge clk);
          while (!ce) begin ce = 1; @(negedge clk); end
          if ($urandom_range(0, 4) == 0) begin
            mac_en = 0; s_feed = (LA*LM)'($urandom); @(negedge clk);
          end
        end
      mac_en = 0;
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        for (int j = 0; j < M; j++) begin
          checks++;
          if (parity[c][j] !== exp[c][j]) begin
            failures++;
            if (failures < 10) $display("frame %0d col %0d bit %0d: got %b exp %b", f, c, j, parity[c][j], exp[c][j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
