// ar4ja_ctrl_buffer: control and buffer unit of the AR4JA encoder.
//
// Receives transfer frames (TFs) on an AXI4-Stream slave, W = LA*LM bits per
// word, with no framing signals: TF boundaries are kept by counters (k/W words
// per TF). Each accepted word goes to two memories:
//  * the systematic FIFO, from which the systematic part of the CADU is sent;
//  * the PRCE page memory, a double buffer of two pages of LA*m bits. A page
//    holds a group of LA consecutive generator circulant rows. The PRCE takes
//    LM bits of each of the LA circulants of a page per step, so it can start
//    on a page once the first LA*LM bits of its last circulant are in, i.e.
//    (LA-1)*m/W words after the page began.
// The output side walks through the CADU: ASM (64 bits), k systematic bits
// from the FIFO, then the 8m parity bits held in the PRCE. The PRCE may not
// start the next TF until the previous TF's parity has been sent; the page
// double buffer and the FIFO let the input run ahead meanwhile, so in steady
// state with a full-rate source the master interface has no idle cycles.
//
// States: INIT (after reset), ACCUM (gathering START_WORDS words of the next
// TF before the ASM is sent, the systematic latency), ASM_OUT, SYST
// (systematic output from the FIFO), HALT (parity output). Unlike a fixed
// schedule per parameter set, input acceptance is decided by the FIFO and page
// occupancy alone, so one FSM serves every LA/LM combination, including the
// cases where the next TF arrives during the current systematic output.
//
// Interface: ce is the encoder-wide clock enable (master not stalled);
// tready_sl = ce & room, a combinational path from the master's TREADY.
// s_feed/row_grp/mac_en/reset_prce drive the PRCE and function generators.
// sys_valid marks an ASM or systematic word on `systematic`; par_valid marks
// a parity word whose index is par_sel; rand_en marks codeword words to be
// randomized; rand_init restarts the randomizer (during the ASM).
module ar4ja_ctrl_buffer #(
  parameter int K_INFO      = 1024,
  parameter int M           = 128,
  parameter int LA          = 8,
  parameter int LM          = 2,
  localparam int W          = LA * LM,
  localparam int NW         = K_INFO / W,              // words per TF
  localparam int A          = 64 / W,                  // ASM words
  localparam int P          = 8 * M / W,               // parity words
  localparam int GW         = M / LM,                  // words (and steps) per page
  localparam int NG         = K_INFO / (M * LA),       // pages per TF
  localparam int L          = (LA - 1) * M / W,        // systematic latency, words
  parameter int START_WORDS = (L > A) ? (L - A + 2) : 1,
  parameter int FIFO_DEPTH  = L + A + 8,
  localparam int NGB        = (NG > 1) ? $clog2(NG) : 1,
  localparam int PB         = (P > 1) ? $clog2(P) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  // slave interface
  input  logic                    tvalid_sl,
  output logic                    tready_sl,
  input  logic [W-1:0]            tdata_sl,
  // PRCE control
  output logic [LA-1:0][LM-1:0]   s_feed,
  output logic [NGB-1:0]          row_grp,
  output logic                    mac_en,
  output logic                    reset_prce,
  // output selection
  output logic                    sys_valid,
  output logic [W-1:0]            systematic,
  output logic                    par_valid,
  output logic [PB-1:0]           par_sel,
  output logic                    rand_en,
  output logic                    rand_init
);
  import ldpc_pkg::*;

  typedef enum logic [2:0] {INIT, ACCUM, ASM_OUT, SYST, HALT} state_e;

  // ---------------- parameter checks ----------------
  initial begin
    assert (M % W == 0) else $error("m must be a multiple of LA*LM");
    assert ((K_INFO / M) % LA == 0) else $error("LA must divide the circulant row count");
    assert (64 % W == 0) else $error("LA*LM must divide the 64-bit ASM");
    assert (FIFO_DEPTH >= START_WORDS) else $error("FIFO too small");
  end

  // ---------------- input side ----------------
  localparam int FCW = $clog2(FIFO_DEPTH + 1);
  logic           fifo_full, fifo_empty, fifo_rd;
  logic [W-1:0]   fifo_dout;
  logic [FCW-1:0] fifo_count;

  logic [1:0]                 full_bufs;   // pages written and not yet processed
  logic                       wsel, psel;
  logic [$clog2(GW+1)-1:0]    wcnt;        // words written into the current page
  logic [LA*M-1:0]            page [2];
  logic                       accept;

  assign tready_sl = ce && !fifo_full && (full_bufs < 2'd2);
  assign accept    = tvalid_sl && tready_sl;

  sync_fifo #(.W(W), .DEPTH(FIFO_DEPTH)) u_sys_fifo (
    .clk, .rst_n,
    .wr_en (accept),
    .din   (tdata_sl),
    .rd_en (fifo_rd),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count (fifo_count)
  );

  always_ff @(posedge clk) begin
    if (accept)
      for (int i = 0; i < W; i++)
        page[wsel][int'(wcnt) * W + i] <= tdata_sl[W-1-i];
  end

  // ---------------- PRCE side ----------------
  logic [$clog2(GW+1)-1:0] pstep;     // step within the page
  logic [NGB-1:0]          pgrp;      // page within the TF
  logic                    par_pending;
  logic                    feed_ok;
  logic                    page_done, tf_done, wpage_done;

  assign feed_ok = (full_bufs != 2'd0) ||
                   (int'(wcnt) > L + (int'(pstep) * LM) / W);
  assign mac_en  = ce && feed_ok && !par_pending;
  assign row_grp = pgrp;

  always_comb begin
    for (int b = 0; b < LA; b++)
      for (int k = 0; k < LM; k++)
        s_feed[b][LM-1-k] = page[psel][b * M + int'(pstep) * LM + k];
  end

  assign page_done  = mac_en && (int'(pstep) == GW - 1);
  assign tf_done    = page_done && (int'(pgrp) == NG - 1);
  assign wpage_done = accept && (int'(wcnt) == GW - 1);

  // ---------------- output side ----------------
  state_e                  state;
  logic [$clog2(NW+1)-1:0] ocnt;
  logic                    par_last;

  always_comb begin
    sys_valid  = 1'b0;
    par_valid  = 1'b0;
    systematic = fifo_dout;
    par_sel    = PB'(ocnt);
    rand_en    = 1'b0;
    rand_init  = 1'b0;
    fifo_rd    = 1'b0;
    case (state)
      ASM_OUT: begin
        sys_valid  = ce;
        systematic = AR4JA_ASM[63 - int'(ocnt) * W -: W];
        rand_init  = 1'b1;
      end
      SYST: begin
        sys_valid = ce && !fifo_empty;
        rand_en   = sys_valid;
        fifo_rd   = sys_valid;
      end
      HALT: begin
        par_valid = ce && par_pending;
        rand_en   = par_valid;
      end
      default: ;
    endcase
  end

  assign par_last   = par_valid && (int'(ocnt) == P - 1);
  assign reset_prce = par_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= INIT;
      ocnt        <= '0;
      wcnt        <= '0;
      wsel        <= 1'b0;
      psel        <= 1'b0;
      full_bufs   <= '0;
      pstep       <= '0;
      pgrp        <= '0;
      par_pending <= 1'b0;
    end else if (ce) begin
      // page bookkeeping
      if (accept) wcnt <= wpage_done ? '0 : wcnt + 1'b1;
      if (wpage_done) wsel <= ~wsel;
      if (wpage_done && !page_done)      full_bufs <= full_bufs + 1'b1;
      else if (page_done && !wpage_done) full_bufs <= full_bufs - 1'b1;
      if (mac_en) begin
        pstep <= page_done ? '0 : pstep + 1'b1;
        if (page_done) begin
          psel <= ~psel;
          pgrp <= tf_done ? '0 : pgrp + 1'b1;
        end
      end
      if (tf_done)       par_pending <= 1'b1;
      else if (par_last) par_pending <= 1'b0;

      // output FSM
      case (state)
        INIT: state <= ACCUM;
        ACCUM:
          if (int'(fifo_count) >= START_WORDS) begin
            state <= ASM_OUT;
            ocnt  <= '0;
          end
        ASM_OUT:
          if (int'(ocnt) == A - 1) begin
            state <= SYST;
            ocnt  <= '0;
          end else ocnt <= ocnt + 1'b1;
        SYST:
          if (sys_valid) begin
            if (int'(ocnt) == NW - 1) begin
              state <= HALT;
              ocnt  <= '0;
            end else ocnt <= ocnt + 1'b1;
          end
        HALT:
          if (par_valid) begin
            if (par_last) begin
              ocnt  <= '0;
              state <= (int'(fifo_count) >= START_WORDS) ? ASM_OUT : ACCUM;
            end else ocnt <= ocnt + 1'b1;
          end
        default: state <= INIT;
      endcase
    end
  end

endmodule
