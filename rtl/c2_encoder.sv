// c2_encoder: stream encoder for the CCSDS near-earth (8160,7136) C2 LDPC code.
//
// Produces one CADU per 7136-bit transfer frame: the 32-bit attached sync
// marker 1ACFFC1D, the 7136 systematic bits, 1022 parity bits and two fill
// zeros (8160 code bits), optionally XORed with the CCSDS pseudo-random
// sequence (ASM excluded). Buses are 16 bits wide (MSB first). The parity is
// computed by a PRCE with two 511-bit accumulators (LA = 1, LM = 16) fed by the
// C2 control unit, which aligns 16-bit words to the 511-bit circulants, and by
// the C2 function generators, which absorb the alignment by row selection.
//
// Timing: with a full-rate source and sink a CADU takes 513 cycles: 2 ASM
// words, 446 systematic words, one idle cycle, 64 parity words. Output words
// are registered (one cycle from the input word to TDATA_MA). TREADY_MA acts as
// the clock enable of the whole encoder whenever the output register is full.
module c2_encoder #(
  parameter bit RAND_EN = 1'b1
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [15:0] tdata_sl,
  input  logic        tvalid_sl,
  output logic        tready_sl,
  output logic [15:0] tdata_ma,
  output logic        tvalid_ma,
  input  logic        tready_ma
);
  import ldpc_pkg::*;

  logic                                ce;
  logic [0:0][15:0]                    s_feed;
  logic [3:0]                          row;
  logic                                mac_en, reset_prce;
  logic                                sys_valid, par_valid, rand_en, rand_init;
  logic [15:0]                         systematic, par_word, rnd, out_word;
  logic [5:0]                          par_sel;
  logic [0:0][C2_COLS-1:0][C2_M-1:0]   g;
  logic [C2_COLS-1:0][C2_M-1:0]        parity;
  logic [1023:0]                       par_flat;

  assign ce = tready_ma || !tvalid_ma;

  c2_ctrl u_ctrl (
    .clk (aclk), .rst_n (aresetn), .ce,
    .tvalid_sl, .tready_sl, .tdata_sl,
    .s_feed, .row, .mac_en, .reset_prce,
    .sys_valid, .systematic, .par_valid, .par_sel, .rand_en, .rand_init
  );

  c2_func_column u_fcol (.row, .g);

  ldpc_prce #(.NCOL(C2_COLS), .M(C2_M), .LA(1), .LM(16)) u_prce (
    .clk (aclk), .rst_n (aresetn), .ce,
    .mac_en, .reset_prce, .s_feed, .g, .parity
  );

  // parity bits of column 0, then column 1, then the two fill zeros
  always_comb begin
    par_flat = '0;
    for (int j = 0; j < C2_M; j++) begin
      par_flat[j]        = parity[0][j];
      par_flat[C2_M + j] = parity[1][j];
    end
    for (int i = 0; i < 16; i++)
      par_word[15-i] = par_flat[int'(par_sel) * 16 + i];
  end

  ccsds_randomizer #(.W(16)) u_rand (
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

  property p_hold;
    @(posedge aclk) disable iff (!aresetn)
      tvalid_ma && !tready_ma |=> tvalid_ma && $stable(tdata_ma);
  endproperty
  a_hold: assert property (p_hold);

endmodule
