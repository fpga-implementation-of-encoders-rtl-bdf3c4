// c2_checker: stimulus and scoreboard for one C2 encoder instance.
//
// Sends random 7136-bit frames and compares every output word with a CADU
// computed here independently: 18 zeros are prepended, the parity is the GF(2)
// product with the 14 x 2 array of 511-bit circulants written out bit by bit,
// two fill zeros follow and the codeword is XORed with a bit-serial CCSDS
// randomizer. Phase 1 (full throttle) also checks the 513-cycle CADU period:
// exactly one idle output cycle per CADU. Phase 2 adds random stalls.
module c2_checker #(
  parameter bit RAND_EN  = 1'b1,
  parameter int NTF_FULL = 2,
  parameter int NTF_RAND = 2,
  parameter int IN_STALL_PCT = 25   // input stall probability, phase 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] tdata_sl,
  output logic        tvalid_sl,
  input  logic        tready_sl,
  input  logic [15:0] tdata_ma,
  input  logic        tvalid_ma,
  output logic        tready_ma,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          stalls_in,
  output int          stalls_out
);
  import ldpc_pkg::*;

  localparam int KX   = C2_K + C2_ZEROS;           // 7154
  localparam int CADU = 32 + C2_K + 2 * C2_M + C2_FILL;

  logic gtab [C2_ROWS][C2_COLS][C2_M];
  logic [15:0] exp_q [$];
  logic [15:0] src_q [$];
  int          phase;
  bit          rnd_in, rnd_out;

  initial begin
    for (int r = 0; r < C2_ROWS; r++)
      for (int c = 0; c < C2_COLS; c++)
        for (int j = 0; j < C2_M; j++)
          gtab[r][c][j] = gen_bit(C2_SEED, r, c, j);
  end

  task automatic make_tf();
    logic u [KX];
    logic par [2*C2_M];
    logic cw [CADU];
    logic [7:0] lfsr;
    for (int i = 0; i < KX; i++) u[i] = (i < C2_ZEROS) ? 1'b0 : 1'($urandom);
    for (int p = 0; p < 2 * C2_M; p++) par[p] = 1'b0;
    for (int i = 0; i < KX; i++)
      if (u[i]) begin
        int r, t;
        r = i / C2_M; t = i % C2_M;
        for (int c = 0; c < C2_COLS; c++)
          for (int j = 0; j < C2_M; j++)
            par[c*C2_M + j] ^= gtab[r][c][(j - t + C2_M) % C2_M];
      end
    for (int i = 0; i < 32; i++) cw[i] = C2_ASM[31-i];
    lfsr = 8'hFF;
    for (int i = 0; i < CADU - 32; i++) begin
      logic b, rb;
      if (i < C2_K)                 b = u[C2_ZEROS + i];
      else if (i < C2_K + 2 * C2_M) b = par[i - C2_K];
      else                          b = 1'b0;
      rb   = lfsr[0];
      lfsr = {lfsr[7] ^ lfsr[5] ^ lfsr[3] ^ lfsr[0], lfsr[7:1]};
      cw[32 + i] = b ^ (RAND_EN ? rb : 1'b0);
    end
    for (int w = 0; w < C2_K / 16; w++) begin
      logic [15:0] d;
      for (int i = 0; i < 16; i++) d[15-i] = u[C2_ZEROS + w*16 + i];
      src_q.push_back(d);
    end
    for (int w = 0; w < CADU / 16; w++) begin
      logic [15:0] d;
      for (int i = 0; i < 16; i++) d[15-i] = cw[w*16 + i];
      exp_q.push_back(d);
    end
  endtask

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
      if (phase == 2 && rnd_out) stalls_out++;
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

  int  idle, cyc, first_out, last_out;
  bit  seen_out;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tvalid_ma && tready_ma) begin
      if (!seen_out) begin
        seen_out  <= 1'b1;
        first_out <= cyc;
      end
      if (phase == 1) last_out <= cyc;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("c2_checker: unexpected output word %h", tdata_ma);
      end else begin
        if (tdata_ma !== exp_q[0]) begin
          failures++;
          if (failures < 10)
            $display("c2_checker: word mismatch got %h exp %h (%0d left)", tdata_ma, exp_q[0], exp_q.size());
        end
        void'(exp_q.pop_front());
      end
    end
    if (phase == 1 && seen_out && !tvalid_ma && exp_q.size() > 0) idle++;
  end

  initial begin
    done = 0; checks = 0; failures = 0; phase = 0; idle = 0; cyc = 0;
    stalls_in = 0; stalls_out = 0; seen_out = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NTF_FULL; i++) make_tf();
    phase = 1;
    wait (exp_q.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (idle != NTF_FULL || last_out - first_out + 1 != NTF_FULL * 513) begin
      failures++;
      $display("c2_checker: %0d idle cycles, span %0d cycles for %0d CADUs", idle,
               last_out - first_out + 1, NTF_FULL);
    end
    $display("c2_checker: full throttle %0d CADUs in %0d cycles, %0d idle", NTF_FULL,
             last_out - first_out + 1, idle);
    for (int i = 0; i < NTF_RAND; i++) make_tf();
    phase = 2;
    wait (exp_q.size() == 0);
    phase = 3;
    repeat (4) @(posedge clk);
    done = 1;
  end

endmodule
