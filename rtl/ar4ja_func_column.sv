// ar4ja_func_column: function generators of the AR4JA encoder.
//
// For every PRCE branch b and parity column c this block gives the first row
// of the generator circulant that branch b is processing. Branch b handles the
// circulant rows row_grp*LA + b, so with LA equal to the number of circulant
// rows (4K) the row input is constant 0 and the generators reduce to
// constants; with smaller LA each generator is a function of the row input
// with NROWS/LA choices.
//
// The table is built at elaboration from ldpc_pkg::gen_bit, the stand-in for
// the standard's circulant first rows (see ldpc_pkg).
//
// Interface: row_grp selects the group of LA circulant rows; g is
// combinational from it.
module ar4ja_func_column #(
  parameter int          M     = 128,
  parameter int          NROWS = 8,
  parameter int          LA    = 8,
  parameter int unsigned SEED  = ldpc_pkg::AR4JA_SEED,
  localparam int NGRP = NROWS / LA,
  localparam int GW   = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic [GW-1:0]                                 row_grp,
  output logic [LA-1:0][ldpc_pkg::AR4JA_COLS-1:0][M-1:0] g
);
  import ldpc_pkg::*;

  typedef logic [NROWS-1:0][AR4JA_COLS-1:0][M-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < AR4JA_COLS; c++)
        for (int j = 0; j < M; j++)
          t[r][c][j] = gen_bit(SEED, r, c, j);
    return t;
  endfunction

  localparam table_t GTAB = build_table();

  always_comb begin
    for (int b = 0; b < LA; b++)
      g[b] = GTAB[int'(row_grp) * LA + b];
  end

endmodule
