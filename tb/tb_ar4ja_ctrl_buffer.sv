// tb_ar4ja_ctrl_buffer: checks the AR4JA control and buffer unit alone
// (k = 1024, m = 32, LA = 2, LM = 4, 8-bit words) with random TVALID and
// random clock-enable (master) stalls:
//  * every PRCE step presents LM bits of each of the LA circulants of the
//    current page in order (branch b = circulant row grp*LA + b), with the
//    matching row_grp;
//  * the PRCE never starts a frame before the previous parity was sent;
//  * the output sequence per CADU is the 64-bit ASM (randomizer restarted),
//    the frame's words (randomized) and parity words 0..P-1, with reset_prce
//    on the last one.
module tb_ar4ja_ctrl_buffer;
  import ldpc_pkg::*;
  localparam int K = 1024, M = 32, LA = 2, LM = 4, W = LA * LM;
  localparam int NW = K / W, A = 64 / W, P = 8 * M / W, SPG = M / LM, NG = K / (M * LA);
  localparam int NTF = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ce, tvalid_sl, tready_sl, mac_en, reset_prce, sys_valid, par_valid, rand_en, rand_init;
  logic [W-1:0] tdata_sl, systematic;
  logic [LA-1:0][LM-1:0] s_feed;
  logic [3:0] row_grp;
  logic [4:0] par_sel;

  ar4ja_ctrl_buffer #(.K_INFO(K), .M(M), .LA(LA), .LM(LM)) dut (.*);

  logic [W-1:0] sent [$];
  int checks = 0, failures = 0;
  int steps = 0, par_done = 0, opos = 0, otf = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%0t: %s", $time, s);
  endtask

  function automatic logic info_bit(int tf, int i);
    return sent[tf * NW + i / W][W - 1 - i % W];
  endfunction

  // source
  int nsent = 0;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin tvalid_sl <= 0; tdata_sl <= 0; end
    else begin
      if (tvalid_sl && tready_sl) begin sent.push_back(tdata_sl); nsent++; end
      if (!(tvalid_sl && !tready_sl) || !tvalid_sl) begin
        if (nsent + (tvalid_sl && tready_sl) < NTF * NW && $urandom_range(0, 9) < 8) begin
          tvalid_sl <= 1; tdata_sl <= W'($urandom);
        end else tvalid_sl <= 0;
      end
    end

  always @(negedge clk) if (rst_n) ce <= ($urandom_range(0, 9) != 0);

  // monitor (sampled just before the clock edge)
  always @(posedge clk) if (rst_n) begin
    if (mac_en) begin
      int tf, s, grp, t;
      tf = steps / NW; s = steps % NW; grp = s / SPG; t = s % SPG;
      checks++;
      if (tf > par_done) fail("PRCE started a frame before the previous parity was sent");
      if (int'(row_grp) != grp) fail("row_grp");
      for (int b = 0; b < LA; b++)
        for (int k = 0; k < LM; k++) begin
          int idx;
          idx = (grp * LA + b) * M + t * LM + k;
          checks++;
          if (tf * NW + idx / W >= sent.size() + (tvalid_sl && tready_sl ? 1 : 0))
            fail("PRCE used a word not yet received");
          else if (tf * NW + idx / W < sent.size() && s_feed[b][LM-1-k] !== info_bit(tf, idx))
            fail($sformatf("s_feed tf %0d step %0d b %0d k %0d", tf, s, b, k));
        end
      steps++;
    end
    if (sys_valid || par_valid) begin
      checks++;
      if (sys_valid && par_valid) fail("sys_valid and par_valid together");
      if (!ce) fail("output without ce");
      if (opos < A) begin
        if (!sys_valid || systematic !== AR4JA_ASM[63 - opos*W -: W] || !rand_init || rand_en)
          fail("ASM word");
      end else if (opos < A + NW) begin
        if (!sys_valid || systematic !== sent[otf * NW + opos - A] || !rand_en)
          fail($sformatf("systematic word %0d", opos - A));
      end else begin
        if (!par_valid || int'(par_sel) != opos - A - NW || !rand_en) fail("parity word");
        if (steps < (otf + 1) * NW) fail("parity sent before the PRCE finished");
        if (reset_prce != (opos == A + NW + P - 1)) fail("reset_prce");
      end
      opos++;
      if (opos == A + NW + P) begin opos = 0; otf++; par_done++; end
    end else if (reset_prce) fail("stray reset_prce");
  end

  initial begin
    ce = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (otf == NTF);
    checks++;
    if (steps != NTF * NW) fail("step count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
