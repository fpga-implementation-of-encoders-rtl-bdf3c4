// tb_test_ctrl: runs the control unit with a small frame count against a
// simple environment model (input FIFO, encoder that turns IN_WPF words into
// OUT_WPF words, output FIFO of one stage) in both modes, and checks the
// state sequence, the word limits, the start conditions and the cycle count.
module tb_test_ctrl;
  localparam int IN_WPF = 4, OUT_WPF = 6, NU = 3, NL = 5, DEPTH = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic dcm_locked, lfsr_mode, start_pulse, fifoin_wen, fifoin_full, fifo_in_empty;
  logic fifo_out_empty, tvalid_ma, tready_ma, accept, lfsr_ce, rdy, encode_fin;
  logic [19:0] encode_cycles;
  int checks = 0, failures = 0;
  int fifo_n, enc_in, enc_out_pend, out_fifo, written, produced, run_cycles;
  bit strobe;

  test_ctrl #(.IN_WPF(IN_WPF), .OUT_WPF(OUT_WPF), .NTF_UART(NU), .NTF_LFSR(NL), .CYC_BITS(20)) dut (.*);

  assign fifoin_full    = (fifo_n == DEPTH);
  assign fifo_in_empty  = (fifo_n == 0);
  assign fifo_out_empty = (out_fifo == 0);
  assign tvalid_ma      = (enc_out_pend > 0);
  assign fifoin_wen     = lfsr_mode ? lfsr_ce : (strobe && accept);

  // environment: the encoder takes a word whenever there is one and emits
  // OUT_WPF words per IN_WPF taken when tready_ma is high
  always @(posedge clk) if (rst_n) begin
    automatic bit wr = fifoin_wen && !fifoin_full;
    automatic bit rd = fifo_n > 0;
    if (wr) written++;
    fifo_n <= fifo_n + int'(wr) - int'(rd);
    if (rd) begin
      enc_in++;
      if (enc_in % IN_WPF == 0) enc_out_pend <= enc_out_pend + OUT_WPF - int'(tvalid_ma && tready_ma);
      else if (tvalid_ma && tready_ma) enc_out_pend <= enc_out_pend - 1;
    end else if (tvalid_ma && tready_ma) enc_out_pend <= enc_out_pend - 1;
    out_fifo <= int'(tvalid_ma && tready_ma);
    if (tvalid_ma && tready_ma) produced++;
    if (tready_ma) run_cycles++;
  end

  task automatic run(bit mode);
    int n, ntf;
    ntf = mode ? NL : NU;
    rst_n = 0; lfsr_mode = mode; dcm_locked = 0; start_pulse = 0; strobe = 0;
    fifo_n = 0; enc_in = 0; enc_out_pend = 0; out_fifo = 0; written = 0; produced = 0;
    run_cycles = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (rdy || accept || tready_ma) failures++;      // waiting for lock
    dcm_locked = 1;
    n = 0;
    while (!rdy && n < 10) begin @(negedge clk); n++; end
    checks++;
    if (!rdy) failures++;
    if (mode) begin
      repeat (40) @(negedge clk);
      checks += 2;
      if (tready_ma) failures++;                     // waits for the button
      if (written == 0 || produced != 0) begin     // source runs, nothing leaves yet
        failures++; $display("mode 1: %0d words written before start", written);
      end
      start_pulse = 1; @(negedge clk); start_pulse = 0;
    end else begin
      while (!tready_ma && n < 1000) begin
        strobe = ($urandom_range(0, 1) == 1);
        @(negedge clk); n++;
      end
      strobe = 0;
    end
    n = 0;
    while (!encode_fin && n < 2000) begin @(negedge clk); n++; end
    repeat (5) @(negedge clk);
    checks += 4;
    if (!encode_fin) failures++;
    if (written != ntf * IN_WPF) begin failures++; $display("mode %0d: %0d words in", mode, written); end
    if (produced != ntf * OUT_WPF) begin failures++; $display("mode %0d: %0d words out", mode, produced); end
    if (int'(encode_cycles) != run_cycles) begin
      failures++; $display("mode %0d: cycles %0d expected %0d", mode, encode_cycles, run_cycles);
    end
  endtask

  initial begin
    run(0); run(1); run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
