// ldpc_prce: parallel recursive convolutional encoder (PRCE).
//
// Multiplies the information stream by a quasi-cyclic generator matrix whose
// parity part is an array of dense MxM circulants. One M-bit accumulator per
// circulant column holds the partial parity. The circulant first rows stay
// stationary (they come from the function generators) and the accumulators
// rotate instead: every step each accumulator rotates by LM positions and
// takes, per bit, LA*LM AND-XOR terms, one for each of the LM successive
// information bits of each of the LA circulant rows processed in parallel.
// The LA branches' products are added in the same XOR tree.
//
// Convention: row t of a circulant is its first row g rotated right by t, so
// parity bit j of column c receives u_t & g[(j - t) mod M]. With the
// accumulator rotating by LM per step, the term for bit k (k = 0 earliest) of
// a step is g[(j + LM - k) mod M]. After a whole circulant (M/LM steps, or any
// number of steps whose rotation adds up to a multiple of M) the result is
// aligned; the C2 encoder compensates its irregular steps by the row it
// selects (see c2_func_column).
//
// Interface: s_feed[b] holds the LM bits of branch b, s_feed[b][LM-1] first.
// g[b][c] is the first row for branch b, column c. mac_en performs one step,
// reset_prce clears all accumulators (it takes priority). parity[c] is the
// accumulator of column c, bit j = parity bit j. ce freezes the block.
module ldpc_prce #(
  parameter int NCOL = 8,
  parameter int M    = 128,
  parameter int LA   = 8,
  parameter int LM   = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               ce,
  input  logic                               mac_en,
  input  logic                               reset_prce,
  input  logic [LA-1:0][LM-1:0]              s_feed,
  input  logic [LA-1:0][NCOL-1:0][M-1:0]     g,
  output logic [NCOL-1:0][M-1:0]             parity
);

  logic [NCOL-1:0][M-1:0] acc_next;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    for (genvar j = 0; j < M; j++) begin : g_bit
      logic [LA*LM-1:0] terms;
      for (genvar b = 0; b < LA; b++) begin : g_branch
        for (genvar k = 0; k < LM; k++) begin : g_term
          assign terms[b*LM + k] = s_feed[b][LM-1-k] & g[b][c][(j + LM - k) % M];
        end
      end
      assign acc_next[c][j] = parity[c][(j + LM) % M] ^ (^terms);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               parity <= '0;
    else if (ce) begin
      if (reset_prce)         parity <= '0;
      else if (mac_en)        parity <= acc_next;
    end
  end

endmodule
