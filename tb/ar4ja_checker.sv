// ar4ja_checker: stimulus and scoreboard for one AR4JA encoder instance.
//
// Drives the slave interface with random transfer frames and the master's
// TREADY, and compares every output word with a CADU computed here
// independently: the parity is a plain GF(2) product of the frame with the
// generator matrix written out bit by bit (row t of a circulant = first row
// rotated right by t), the randomizing sequence comes from a bit-serial LFSR.
// Phase 1 runs at full throttle (source always valid, sink always ready) and
// checks that the master interface has no idle cycle from the first CADU word
// to the last and the systematic latency; phase 2 inserts random stalls on
// TVALID_SL and TREADY_MA.
module ar4ja_checker #(
  parameter int              K_INFO   = 1024,
  parameter ldpc_pkg::rate_e RATE     = ldpc_pkg::R12,
  parameter int              LA       = 8,
  parameter int              LM       = 2,
  parameter bit              RAND_EN  = 1'b1,
  parameter int              NTF_FULL = 3,
  parameter int              NTF_RAND = 3,
  parameter int              IN_STALL_PCT = 25,  // input stall probability, phase 2
  parameter int              EXP_LAT  = -1,   // expected systematic latency, -1: not checked
  localparam int W = LA * LM,
  localparam int M = ldpc_pkg::ar4ja_gsize(K_INFO, RATE)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] tdata_sl,
  output logic         tvalid_sl,
  input  logic         tready_sl,
  input  logic [W-1:0] tdata_ma,
  input  logic         tvalid_ma,
  output logic         tready_ma,
  output logic         done,
  output int           checks,
  output int           failures,
  output int           stalls_in,
  output int           stalls_out
);
  import ldpc_pkg::*;

  localparam int NROWS = K_INFO / M;
  localparam int NW    = K_INFO / W;
  localparam int CADU  = 64 + K_INFO + 8 * M;

  logic gtab [NROWS][8][M];
  logic [W-1:0] exp_q [$];
  logic [W-1:0] src_q [$];
  int           phase;   // 1 full throttle, 2 random stalls
  bit           rnd_in, rnd_out;

  initial begin
    for (int r = 0; r < NROWS; r++)
      for (int c = 0; c < 8; c++)
        for (int j = 0; j < M; j++)
          gtab[r][c][j] = gen_bit(AR4JA_SEED, r, c, j);
  end

  // Builds one frame, queues its words and its expected CADU words.
  task automatic make_tf();
    logic u [K_INFO];
    logic par [8*M];
    logic cw [CADU];
    logic [7:0] lfsr;
    for (int i = 0; i < K_INFO; i++) u[i] = 1'($urandom);
    for (int p = 0; p < 8 * M; p++) par[p] = 1'b0;
    for (int i = 0; i < K_INFO; i++)
      if (u[i]) begin
        int r, t;
        r = i / M; t = i % M;
        for (int c = 0; c < 8; c++)
          for (int j = 0; j < M; j++)
            par[c*M + j] ^= gtab[r][c][(j - t + M) % M];
      end
    for (int i = 0; i < 64; i++) cw[i] = AR4JA_ASM[63-i];
    lfsr = 8'hFF;
    for (int i = 0; i < K_INFO + 8 * M; i++) begin
      logic b, rb;
      b  = (i < K_INFO) ? u[i] : par[i - K_INFO];
      rb = lfsr[0];
      lfsr = {lfsr[7] ^ lfsr[5] ^ lfsr[3] ^ lfsr[0], lfsr[7:1]};
      cw[64 + i] = b ^ (RAND_EN ? rb : 1'b0);
    end
    for (int w = 0; w < NW; w++) begin
      logic [W-1:0] d;
      for (int i = 0; i < W; i++) d[W-1-i] = u[w*W + i];
      src_q.push_back(d);
    end
    for (int w = 0; w < CADU / W; w++) begin
      logic [W-1:0] d;
      for (int i = 0; i < W; i++) d[W-1-i] = cw[w*W + i];
      exp_q.push_back(d);
    end
  endtask

  // source and sink
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tvalid_sl <= 1'b0;
      tdata_sl  <= '0;
      tready_ma <= 1'b0;
    end else begin
      if (tvalid_sl && tready_sl) void'(src_q.pop_front());
      rnd_in  = (phase == 2) && ($urandom_range(0, 99) < IN_STALL_PCT);
      rnd_out = (phase == 2) && ($urandom_range(0, 4) == 0);
      tready_ma <= (phase != 0) && !rnd_out;
      if (phase == 2 && !rnd_out && tready_ma == 1'b0) stalls_out++;
      // a word stays on the bus until it is taken
      if (!(tvalid_sl && !tready_sl)) begin
        if (src_q.size() > 0 && !rnd_in) begin
          tvalid_sl <= 1'b1;
          tdata_sl  <= src_q[0];
        end else begin
          tvalid_sl <= 1'b0;
          if (src_q.size() > 0) stalls_in++;
        end
      end
    end
  end

  // scoreboard and throughput / latency measurement
  int  idle, first_out, last_out, cyc, first_in, lat;
  bit  seen_in, seen_out;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tvalid_sl && tready_sl && !seen_in) begin
      seen_in  <= 1'b1;
      first_in <= cyc;
    end
    if (rst_n && tvalid_ma && tready_ma) begin
      if (!seen_out) begin
        seen_out <= 1'b1;
        lat      <= cyc - first_in;
      end
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ar4ja_checker LA=%0d LM=%0d: unexpected output word %h", LA, LM, tdata_ma);
      end else begin
        if (tdata_ma !== exp_q[0]) begin
          failures++;
          if (failures < 10)
            $display("ar4ja_checker LA=%0d LM=%0d: word mismatch got %h exp %h (%0d left)",
                     LA, LM, tdata_ma, exp_q[0], exp_q.size());
        end
        void'(exp_q.pop_front());
      end
    end
    if (phase == 1 && seen_out && !tvalid_ma && exp_q.size() > 0) idle++;
  end

  initial begin
    done = 0; checks = 0; failures = 0; phase = 0; idle = 0; cyc = 0;
    stalls_in = 0; stalls_out = 0; seen_in = 0; seen_out = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NTF_FULL; i++) make_tf();
    phase = 1;
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (idle != 0) begin
      failures++;
      $display("ar4ja_checker LA=%0d LM=%0d: %0d idle output cycles at full throttle", LA, LM, idle);
    end
    checks++;
    if (EXP_LAT >= 0 && lat != EXP_LAT) begin
      failures++;
      $display("ar4ja_checker LA=%0d LM=%0d: systematic latency %0d, expected %0d", LA, LM, lat, EXP_LAT);
    end
    $display("ar4ja_checker k=%0d rate=%0d LA=%0d LM=%0d: latency %0d cycles, idle %0d",
             K_INFO, RATE, LA, LM, lat, idle);
    for (int i = 0; i < NTF_RAND; i++) make_tf();
    phase = 2;
    wait (exp_q.size() == 0);
    phase = 3;
    repeat (4) @(posedge clk);
    done = 1;
  end

endmodule
