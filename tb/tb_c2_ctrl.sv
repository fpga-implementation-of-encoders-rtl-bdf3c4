// tb_c2_ctrl: checks the C2 control unit alone, with random TVALID and random
// clock-enable (master) stalls. For every frame the PRCE must receive 447
// steps of 16 bits: the 18 prepended zeros plus the frame, laid out in 14
// circulants of 511 bits each followed by one zero slot, with the first 16
// slots (all zeros) skipped; row must name the circulant of each step. The
// output sequence must be the two ASM words, the 446 frame words, one cycle
// with no output (the buffer-emptying step), and parity words 0..63 with
// reset_prce on the last.
module tb_c2_ctrl;
  import ldpc_pkg::*;
  localparam int NW = 446, NTF = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ce, tvalid_sl, tready_sl, mac_en, reset_prce, sys_valid, par_valid, rand_en, rand_init;
  logic [15:0] tdata_sl, systematic;
  logic [0:0][15:0] s_feed;
  logic [3:0] row;
  logic [5:0] par_sel;

  c2_ctrl dut (.*);

  logic [15:0] sent [$];
  int checks = 0, failures = 0, steps = 0, opos = 0, otf = 0, nsent = 0;
  int gap = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%0t: %s", $time, s);
  endtask

  // bit q of the padded layout of frame tf (512 slots per circulant)
  function automatic logic padded_bit(int tf, int q);
    int r, t, i;
    r = q / 512; t = q % 512;
    if (t == 511) return 1'b0;
    i = r * C2_M + t - C2_ZEROS;           // index into the frame
    if (i < 0) return 1'b0;
    return sent[tf * NW + i / 16][15 - i % 16];
  endfunction

  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin tvalid_sl <= 0; tdata_sl <= 0; end
    else begin
      if (tvalid_sl && tready_sl) begin sent.push_back(tdata_sl); nsent++; end
      if (!(tvalid_sl && !tready_sl) || !tvalid_sl) begin
        if (nsent + (tvalid_sl && tready_sl) < NTF * NW && $urandom_range(0, 9) < 8) begin
          tvalid_sl <= 1; tdata_sl <= 16'($urandom);
        end else tvalid_sl <= 0;
      end
    end

  always @(negedge clk) if (rst_n) ce <= ($urandom_range(0, 9) != 0);

  always @(posedge clk) if (rst_n) begin
    if (mac_en) begin
      int tf, s;
      tf = steps / 447; s = steps % 447;
      checks++;
      if (int'(row) != (s + 1) / 32) fail($sformatf("row at step %0d", s));
      for (int k = 0; k < 16; k++) begin
        int q;
        q = 16 * (s + 1) + k;
        checks++;
        begin
          int i;
          logic e;
          i = q / 512 * C2_M + q % 512 - C2_ZEROS;
          if (q % 512 == 511 || i < 0)              e = 1'b0;
          else if (tf * NW + i / 16 < sent.size())  e = padded_bit(tf, q);
          else if (tf * NW + i / 16 == sent.size() && tvalid_sl && tready_sl)
                                                    e = tdata_sl[15 - i % 16];
          else begin
            e = 1'bx;
            fail("PRCE used a word not yet received");
          end
          if (s_feed[0][15-k] !== e) fail($sformatf("s_feed frame %0d step %0d bit %0d", tf, s, k));
        end
      end
      steps++;
    end
    if (sys_valid || par_valid) begin
      checks++;
      if (opos < 2) begin
        if (!sys_valid || systematic !== C2_ASM[31 - 16*opos -: 16] || !rand_init) fail("ASM word");
      end else if (opos < 2 + NW) begin
        if (!sys_valid || systematic !== tdata_sl || !rand_en) fail("systematic word");
      end else begin
        if (!par_valid || int'(par_sel) != opos - 2 - NW || !rand_en) fail("parity word");
        if (opos == 2 + NW) begin
          checks++;
          if (gap != 1) fail($sformatf("%0d cycles without output before the parity", gap));
          if (steps != (otf + 1) * 447) fail("parity before the last PRCE step");
        end
        if (reset_prce != (opos == 2 + NW + 63)) fail("reset_prce");
      end
      opos++;
      gap = 0;
      if (opos == 2 + NW + 64) begin opos = 0; otf++; end
    end else if (ce && opos == 2 + NW) gap++;
  end

  initial begin
    ce = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (otf == NTF);
    checks++;
    if (steps != NTF * 447) fail("step count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
