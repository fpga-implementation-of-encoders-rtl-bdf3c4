// ar4ja_encoder: stream encoder for the CCSDS AR4JA LDPC code family.
//
// Turns a continuous stream of k-bit transfer frames into CADUs: the 64-bit
// attached sync marker, the k systematic bits and the 8m non-punctured parity
// bits (n - k = 8m for every rate), optionally XORed with the CCSDS
// pseudo-random sequence (ASM excluded). The parity comes from a parallel
// recursive convolutional encoder (PRCE) working on the systematic-circulant
// generator matrix G = [I W], W being a 4K x 8 array of m x m circulants.
// Two degrees of parallelism set the bus width W = LA*LM: LM successive bits
// of a circulant per step and LA circulant rows at once. Larger LA simplifies
// the function generators (constants when LA = 4K) at the cost of
// (LA-1)*m/W cycles of systematic latency and a 2*LA*m-bit page buffer.
//
// Structure: control and buffer unit -> (s_feed, row) -> function columns +
// PRCE -> parity multiplexer; systematic/ASM words and parity words are
// selected, randomized and registered on the AXI4-Stream master.
// Flow control: TREADY_MA is the clock enable of the whole encoder (whenever
// the output register holds valid data), and it gates TREADY_SL
// combinationally.
//
// Parameters: K_INFO = k (1024, 4096, 16384), RATE, LA, LM, RAND_EN.
// Defaults are k = 1024, rate 1/2, LA = 8, LM = 2 (16-bit buses), the
// configuration run in hardware at the highest speed. Bit order: the MSB of a
// bus word is the first bit of the stream.
module ar4ja_encoder #(
  parameter int             K_INFO  = 1024,
  parameter ldpc_pkg::rate_e RATE   = ldpc_pkg::R12,
  parameter int             LA      = 8,
  parameter int             LM      = 2,
  parameter bit             RAND_EN = 1'b1,
  localparam int W     = LA * LM,
  localparam int M     = ldpc_pkg::ar4ja_gsize(K_INFO, RATE),
  localparam int NROWS = K_INFO / M,
  localparam int NG    = NROWS / LA,
  localparam int NGB   = (NG > 1) ? $clog2(NG) : 1,
  localparam int P     = 8 * M / W,
  localparam int PB    = (P > 1) ? $clog2(P) : 1
) (
  input  logic         aclk,
  input  logic         aresetn,
  // slave (transfer frames)
  input  logic [W-1:0] tdata_sl,
  input  logic         tvalid_sl,
  output logic         tready_sl,
  // master (CADUs)
  output logic [W-1:0] tdata_ma,
  output logic         tvalid_ma,
  input  logic         tready_ma
);
  import ldpc_pkg::*;

  logic                                 ce;
  logic [LA-1:0][LM-1:0]                s_feed;
  logic [NGB-1:0]                       row_grp;
  logic                                 mac_en, reset_prce;
  logic                                 sys_valid, par_valid, rand_en, rand_init;
  logic [W-1:0]                         systematic, par_word, rnd, out_word;
  logic [PB-1:0]                        par_sel;
  logic [LA-1:0][AR4JA_COLS-1:0][M-1:0] g;
  logic [AR4JA_COLS-1:0][M-1:0]         parity;
  logic [AR4JA_COLS*M-1:0]              par_flat;

  assign ce = tready_ma || !tvalid_ma;

  ar4ja_ctrl_buffer #(.K_INFO(K_INFO), .M(M), .LA(LA), .LM(LM)) u_ctrl (
    .clk (aclk), .rst_n (aresetn), .ce,
    .tvalid_sl, .tready_sl, .tdata_sl,
    .s_feed, .row_grp, .mac_en, .reset_prce,
    .sys_valid, .systematic, .par_valid, .par_sel, .rand_en, .rand_init
  );

  ar4ja_func_column #(.M(M), .NROWS(NROWS), .LA(LA)) u_fcol (
    .row_grp, .g
  );

  ldpc_prce #(.NCOL(AR4JA_COLS), .M(M), .LA(LA), .LM(LM)) u_prce (
    .clk (aclk), .rst_n (aresetn), .ce,
    .mac_en, .reset_prce, .s_feed, .g, .parity
  );

  // Parity multiplexer: parity bit p = c*m + j is column c, bit j; word w
  // carries bits w*W .. w*W+W-1, the first of them in the MSB.
  always_comb begin
    for (int c = 0; c < AR4JA_COLS; c++)
      for (int j = 0; j < M; j++)
        par_flat[c * M + j] = parity[c][j];
    for (int i = 0; i < W; i++)
      par_word[W-1-i] = par_flat[int'(par_sel) * W + i];
  end

  ccsds_randomizer #(.W(W)) u_rand (
    .clk (aclk), .rst_n (aresetn), .ce,
    .init (rand_init), .adv (rand_en), .rnd
  );

  assign out_word = (sys_valid ? systematic : par_word) ^
                    ((RAND_EN && rand_en) ? rnd : '0);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      tvalid_ma <= 1'b0;
      tdata_ma  <= '0;
    end else if (ce) begin
      tvalid_ma <= sys_valid || par_valid;
      tdata_ma  <= out_word;
    end
  end

  // AXI4-Stream: data must hold while the receiver stalls.
  property p_hold;
    @(posedge aclk) disable iff (!aresetn)
      tvalid_ma && !tready_ma |=> tvalid_ma && $stable(tdata_ma);
  endproperty
  a_hold: assert property (p_hold);

endmodule
