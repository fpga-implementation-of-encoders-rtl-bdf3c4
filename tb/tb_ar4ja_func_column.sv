// tb_ar4ja_func_column: checks that every branch of the function columns
// presents the first rows of circulant row row_grp*LA + b, for a
// multi-group configuration (LA = 2 of 8 rows) and for the constant case
// (LA = 8), against the circulant definition in ldpc_pkg.
module tb_ar4ja_func_column;
  import ldpc_pkg::*;
  localparam int M = 32;

  logic [1:0]                             grp_a;
  logic [1:0][AR4JA_COLS-1:0][M-1:0]      g_a;
  logic [0:0]                             grp_b;
  logic [7:0][AR4JA_COLS-1:0][M-1:0]      g_b;

  ar4ja_func_column #(.M(M), .NROWS(8), .LA(2)) u_a (.row_grp(grp_a), .g(g_a));
  ar4ja_func_column #(.M(M), .NROWS(8), .LA(8)) u_b (.row_grp(grp_b), .g(g_b));

  int checks = 0, failures = 0;
  initial begin
    grp_b = '0;
    for (int gr = 0; gr < 4; gr++) begin
      grp_a = 2'(gr);
      #1;
      for (int b = 0; b < 2; b++)
        for (int c = 0; c < AR4JA_COLS; c++)
          for (int j = 0; j < M; j++) begin
            checks++;
            if (g_a[b][c][j] !== gen_bit(AR4JA_SEED, gr*2 + b, c, j)) failures++;
          end
    end
    for (int b = 0; b < 8; b++)
      for (int c = 0; c < AR4JA_COLS; c++)
        for (int j = 0; j < M; j++) begin
          checks++;
          if (g_b[b][c][j] !== gen_bit(AR4JA_SEED, b, c, j)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
