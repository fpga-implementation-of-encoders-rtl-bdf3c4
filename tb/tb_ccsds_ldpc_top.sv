// tb_ccsds_ldpc_top: end-to-end test of both encoders at the default
// parameters (AR4JA k = 1024, rate 1/2, LA = 8, LM = 2; C2), run
// concurrently. Frames are sent at full throttle and then with random stalls;
// every CADU word is checked against independently computed CADUs. Counts how
// often each mechanism happened and fails if one never did: input stalls,
// output stalls, the AR4JA PRCE waiting for the previous parity (pipelined
// frames), the AR4JA systematic FIFO full and running dry, the C2 buffer-emptying step,
// and the C2 direct HALT -> ASM transition for back-to-back frames.
// The test harness then runs its complete default tests: 960 frames loaded
// byte by byte through the serial input, and after a reset and a switch to
// generated input, 5000 LFSR frames started by a bouncing button. Its input
// words, CADU count, printed cycle count and printed signature are checked
// against a MISR model run here over the harness encoder's output.
module tb_ccsds_ldpc_top;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial begin #1 rst_n = 1'b0; repeat (3) @(posedge clk); rst_n = 1'b1; end

  // test harness signals
  logic [7:0] ts_rx_data, ts_txd;
  logic       ts_lfsr_mode = 1'b0, ts_rx_strobe = 1'b0, ts_btn = 1'b0, ts_send, ts_txc = 1'b0;

  logic [15:0] a_sl, a_ma, c_sl, c_ma;
  logic        a_vs, a_rs, a_vm, a_rm, c_vs, c_rs, c_vm, c_rm;
  logic [1:0]  done;
  int          checks [2], failures [2], si [2], so [2];

  ccsds_ldpc_top dut (
    .aclk (clk), .aresetn (rst_n),
    .ar4ja_tdata_sl (a_sl), .ar4ja_tvalid_sl (a_vs), .ar4ja_tready_sl (a_rs),
    .ar4ja_tdata_ma (a_ma), .ar4ja_tvalid_ma (a_vm), .ar4ja_tready_ma (a_rm),
    .c2_tdata_sl (c_sl), .c2_tvalid_sl (c_vs), .c2_tready_sl (c_rs),
    .c2_tdata_ma (c_ma), .c2_tvalid_ma (c_vm), .c2_tready_ma (c_rm),
    .ts_dcm_locked (1'b1), .ts_lfsr_mode, .ts_rx_data, .ts_rx_strobe, .ts_start_btn (ts_btn),
    .ts_txuart_data (ts_txd), .ts_send_character (ts_send), .ts_tx_complete (ts_txc)
  );

  // ---- test harness observation --------------------------------------------
  logic [15:0] ts_exp [$];
  logic [63:0] ts_misr;
  int          ts_in, ts_out, ts_bad;
  string       ts_text;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_test.in_empty && dut.u_test.tready_sl) begin
      ts_in++;
      if (ts_exp.size() == 0 || ts_exp[0] !== dut.u_test.in_dout) ts_bad++;
      if (ts_exp.size() != 0) void'(ts_exp.pop_front());
    end
    if (dut.u_test.tvalid_ma && dut.u_test.tready_ma) begin
      logic b;
      ts_out++;
      b = ts_misr[63] ^ ts_misr[3] ^ ts_misr[2] ^ ts_misr[0];
      ts_misr = {ts_misr[62:0], b} ^ {48'b0, dut.u_test.tdata_ma};
    end
  end
  initial forever begin
    @(posedge clk);
    if (ts_send) begin
      ts_text = {ts_text, string'(ts_txd)};
      @(negedge clk) ts_txc = 1;
      @(negedge clk) ts_txc = 0;
    end
  end

  function automatic logic [15:0] lfsr_word(ref logic [31:0] s);
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      logic b;
      b = s[31] ^ s[21] ^ s[1] ^ s[0];
      s = {s[30:0], b};
      w = {w[14:0], b};
    end
    return w;
  endfunction

  int tc, tf;
  int n_serial_runs, n_lfsr_runs, n_bounce;
  // one complete harness test; ntf frames of 64 words, CADUs of 132 words
  task automatic ts_run(bit mode, int ntf);
    int n, cyc;
    logic [31:0] st;
    string e, h;
    ts_exp.delete(); ts_misr = '0; ts_in = 0; ts_out = 0; ts_bad = 0;
    if (mode) begin
      st = '1;
      for (int i = 0; i < ntf * 64; i++) ts_exp.push_back(lfsr_word(st));
    end
    n = 0;
    while (ts_text.len() < 5 && n < 1000) begin @(negedge clk); n++; end
    tc++;
    if (ts_text != "RDY\r\n") begin tf++; $display("harness ready message '%s'", ts_text); end
    ts_text = "";
    if (mode) begin
      repeat (2000) @(negedge clk);
      for (int i = 0; i < 7; i++) begin ts_btn = ~ts_btn; n_bounce++; repeat (5) @(negedge clk); end
    end else begin
      for (int i = 0; i < ntf * 64; i++) begin
        logic [15:0] w = 16'($urandom);
        ts_exp.push_back(w);
        ts_rx_data = w[15:8]; ts_rx_strobe = 1; @(negedge clk);
        ts_rx_data = w[7:0];  @(negedge clk);
        ts_rx_strobe = 0;
      end
    end
    n = 0;
    while (!(ts_text.len() > 2 && ts_text.substr(ts_text.len() - 1, ts_text.len() - 1) == "\n")
           && n < 1000000) begin
      @(negedge clk); n++;
    end
    cyc = int'(dut.u_test.encode_cycles);
    h = $sformatf("%016h", ts_misr);
    h = h.toupper();
    e = $sformatf("CYCLES TO ENCODE %0d FRAMES : %06d SIGNATURE IS:%s\r\n", ntf, cyc, h);
    tc += 4;
    if (ts_text != e) begin tf++; $display("harness printed '%s'\nexpected '%s'", ts_text, e); end
    if (ts_in != ntf * 64 || ts_bad != 0) begin tf++; $display("harness: %0d input words, %0d wrong", ts_in, ts_bad); end
    if (ts_out != ntf * 132) begin tf++; $display("harness: %0d CADU words", ts_out); end
    if (cyc < ntf * 132 || cyc > ntf * 132 + 100) begin tf++; $display("harness: %0d cycles", cyc); end
    $display("harness %s input: %0d frames in %0d cycles, signature %s",
             mode ? "generated" : "serial", ntf, cyc, h);
    if (mode) n_lfsr_runs++; else n_serial_runs++;
  endtask

  ar4ja_checker #(.NTF_FULL(4), .NTF_RAND(4), .IN_STALL_PCT(90), .EXP_LAT(56)) u_chk_a (
    .clk, .rst_n, .tdata_sl (a_sl), .tvalid_sl (a_vs), .tready_sl (a_rs),
    .tdata_ma (a_ma), .tvalid_ma (a_vm), .tready_ma (a_rm), .done (done[0]),
    .checks (checks[0]), .failures (failures[0]), .stalls_in (si[0]), .stalls_out (so[0]));

  c2_checker #(.NTF_FULL(2), .NTF_RAND(2)) u_chk_c (
    .clk, .rst_n, .tdata_sl (c_sl), .tvalid_sl (c_vs), .tready_sl (c_rs),
    .tdata_ma (c_ma), .tvalid_ma (c_vm), .tready_ma (c_rm), .done (done[1]),
    .checks (checks[1]), .failures (failures[1]), .stalls_in (si[1]), .stalls_out (so[1]));

  // mechanism counters, observed inside the design
  int n_prce_wait, n_fifo_full, n_fifo_dry, n_empty_buf, n_back_to_back;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ar4ja.u_ctrl.par_pending && dut.u_ar4ja.u_ctrl.feed_ok) n_prce_wait++;
    if (dut.u_ar4ja.u_ctrl.fifo_full) n_fifo_full++;
    if (dut.u_ar4ja.u_ctrl.state == dut.u_ar4ja.u_ctrl.SYST && dut.u_ar4ja.u_ctrl.fifo_empty &&
        dut.u_ar4ja.u_ctrl.ce) n_fifo_dry++;
    if (dut.u_c2.u_ctrl.state == dut.u_c2.u_ctrl.SYS_EMPTY_BUF && dut.u_c2.u_ctrl.ce) n_empty_buf++;
    if (dut.u_c2.u_ctrl.state == dut.u_c2.u_ctrl.HALT && dut.u_c2.u_ctrl.ce &&
        dut.u_c2.u_ctrl.pcnt == 6'd63 && c_vs) n_back_to_back++;
  end

  task automatic need(string what, int n);
    tc++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      tf++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    ts_text = "";
    ts_run(1'b0, 960);
    wait (&done);
    tc += checks[0] + checks[1];
    tf += failures[0] + failures[1];
    rst_n = 1'b0; ts_lfsr_mode = 1'b1;              // mode switch of the harness
    @(negedge clk); ts_text = ""; rst_n = 1'b1;
    ts_run(1'b1, 5000);
    need("harness serial-input runs", n_serial_runs);
    need("harness generated-input runs", n_lfsr_runs);
    need("harness button bounces", n_bounce);
    need("ar4ja input stalls", si[0]);
    need("ar4ja output stalls", so[0]);
    need("c2 input stalls", si[1]);
    need("c2 output stalls", so[1]);
    need("ar4ja PRCE waits for previous parity", n_prce_wait);
    need("ar4ja systematic FIFO full (input held off)", n_fifo_full);
    need("ar4ja systematic FIFO empty during systematic output", n_fifo_dry);
    need("c2 buffer-emptying steps", n_empty_buf);
    need("c2 back-to-back frames", n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
