// c2_func_column: function generators of the C2 (8160,7136) encoder.
//
// Gives, for each of the two parity circulant columns, the generator
// circulant row that the PRCE needs while it processes circulant row `row`
// (0..13) of the generator matrix.
//
// The C2 circulants are 511 bits but the PRCE always rotates its accumulators
// by 16 per step. Each circulant takes 32 steps (512 bit slots, the last slot
// a forced zero), which leaves the accumulators one position off per
// circulant; in addition the first step, which would carry only the 16 leading
// prepended zeros, is skipped. Both effects are pure rotations, so they are
// absorbed by handing the PRCE a rotated row of the circulant instead of its
// first row: for circulant row r it receives line 14 - r (the first row
// rotated right by 14 - r), i.e. line 14 for the first circulant, line 1 for
// the last. No extra datapath logic is needed.
//
// The first rows come from ldpc_pkg::gen_bit (stand-in for the standard's
// table, see ldpc_pkg). Output g is combinational from row.
module c2_func_column (
  input  logic [3:0]                                           row,
  output logic [0:0][ldpc_pkg::C2_COLS-1:0][ldpc_pkg::C2_M-1:0] g
);
  import ldpc_pkg::*;

  typedef logic [C2_ROWS-1:0][C2_COLS-1:0][C2_M-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int r = 0; r < C2_ROWS; r++)
      for (int c = 0; c < C2_COLS; c++)
        for (int x = 0; x < C2_M; x++)
          t[r][c][x] = gen_bit(C2_SEED, r, c, (x - (14 - r) + C2_M) % C2_M);
    return t;
  endfunction

  localparam table_t GTAB = build_table();

  always_comb begin
    g[0] = (int'(row) < C2_ROWS) ? GTAB[row] : '0;
  end

endmodule
