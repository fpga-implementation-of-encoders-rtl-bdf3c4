// tb_c2_func_column: checks that for circulant row r the C2 function
// generators present line 14 - r of that circulant (its first row rotated
// right by 14 - r), and zeros for row values past the last circulant.
module tb_c2_func_column;
  import ldpc_pkg::*;
  logic [3:0] row;
  logic [0:0][C2_COLS-1:0][C2_M-1:0] g;
  c2_func_column dut (.row, .g);

  int checks = 0, failures = 0;
  initial begin
    for (int r = 0; r < 16; r++) begin
      row = 4'(r);
      #1;
      for (int c = 0; c < C2_COLS; c++)
        for (int x = 0; x < C2_M; x++) begin
          logic e;
          e = (r < C2_ROWS) ? gen_bit(C2_SEED, r, c, (x + C2_M - (14 - r)) % C2_M) : 1'b0;
          checks++;
          if (g[0][c][x] !== e) failures++;
        end
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
