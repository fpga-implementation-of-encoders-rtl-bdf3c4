// ldpc_pkg: constants, types and helper functions shared by the CCSDS LDPC
// encoders (AR4JA family and the near-earth C2 code).
//
// Holds the code-family parameters (circulant sizes per rate and block length),
// the attached sync markers and the stand-in generator-matrix contents.
//
// Generator matrix contents: the encoders take the first rows of the dense
// circulants of the systematic generator matrix from the CCSDS standard. Those
// rows are not reproduced here. gen_bit() supplies a deterministic
// pseudo-random stand-in with the same shape (a hash of row, column and bit
// index), so every datapath, alignment and control mechanism is exercised and
// checked against an independent matrix multiplication. To encode real CCSDS
// codewords, replace gen_bit() by the standard's circulant first rows.
package ldpc_pkg;

  // Code rates of the AR4JA family.
  typedef enum logic [1:0] {R12 = 2'd0, R23 = 2'd1, R45 = 2'd2} rate_e;

  // Attached sync markers, transmitted first-bit-first from the MSB.
  localparam logic [63:0] AR4JA_ASM = 64'h034776C7272895B0;
  localparam logic [31:0] C2_ASM    = 32'h1ACFFC1D;

  // C2 code constants.
  localparam int C2_M       = 511;   // circulant size
  localparam int C2_ROWS    = 14;    // circulant rows of the generator matrix
  localparam int C2_COLS    = 2;     // parity circulant columns
  localparam int C2_K       = 7136;  // transfer frame length
  localparam int C2_ZEROS   = 18;    // zeros prepended before encoding
  localparam int C2_FILL    = 2;     // zeros appended after the parity
  localparam int C2_W       = 16;    // bus width

  // AR4JA: K parameter (k/M) per rate: 2, 4, 8.
  function automatic int ar4ja_kpar(rate_e r);
    case (r)
      R12:     return 2;
      R23:     return 4;
      default: return 8;
    endcase
  endfunction

  // AR4JA: parity-check circulant size M = k/K.
  function automatic int ar4ja_msize(int k, rate_e r);
    return k / ar4ja_kpar(r);
  endfunction

  // AR4JA: generator circulant size m = M/4.
  function automatic int ar4ja_gsize(int k, rate_e r);
    return ar4ja_msize(k, r) / 4;
  endfunction

  // Number of AR4JA parity circulant columns (punctured columns omitted).
  localparam int AR4JA_COLS = 8;

  // Stand-in generator-matrix bit: bit j of the first row of the circulant at
  // circulant row r, circulant column c. seed separates the codes.
  function automatic logic gen_bit(int unsigned seed, int unsigned r,
                                   int unsigned c, int unsigned j);
    logic [31:0] x;
    x = seed ^ (r * 32'h9E3779B1) ^ (c * 32'h85EBCA6B) ^ (j * 32'hC2B2AE35);
    x = x ^ (x >> 16);
    x = x * 32'h7FEB352D;
    x = x ^ (x >> 15);
    x = x * 32'h846CA68B;
    x = x ^ (x >> 16);
    return x[0];
  endfunction

  localparam int unsigned AR4JA_SEED = 32'h4A52_3441;
  localparam int unsigned C2_SEED    = 32'h0000_00C2;

endpackage
