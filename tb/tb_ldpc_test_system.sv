// tb_ldpc_test_system: runs the on-chip test harness end to end with a small
// frame count, first with serial input, then with generated input, then
// with the C2 encoder. Checks, against values worked out here:
//  - the words that enter the encoder are the bytes sent (paired, first
//    byte high) or the LFSR sequence (bit-serial model),
//  - every CADU word leaving the encoder reaches the MISR: the printed
//    signature equals a MISR model run over the observed encoder output,
//  - the number of CADU words, and the printed frame count and cycle count
//    (the cycle count also against frames * words per CADU plus a bound),
//  - the ready message.
module tb_ldpc_test_system;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous resets
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // one harness instance per configuration
  logic [7:0] rx_data [2];
  logic       rx_strobe [2], start_btn [2], lfsr_mode [2];
  logic [7:0] txd [2];
  logic       send [2], txc [2];

  ldpc_test_system #(.NTF_UART(3), .NTF_LFSR(4), .DEBOUNCE(8)) dut_a (
    .clk, .rst_n, .dcm_locked (1'b1), .lfsr_mode (lfsr_mode[0]),
    .rx_data (rx_data[0]), .rx_strobe (rx_strobe[0]), .start_btn (start_btn[0]),
    .txuart_data (txd[0]), .send_character (send[0]), .tx_complete (txc[0]));

  ldpc_test_system #(.USE_C2(1'b1), .NTF_UART(2), .NTF_LFSR(2), .DEBOUNCE(8)) dut_c (
    .clk, .rst_n, .dcm_locked (1'b1), .lfsr_mode (lfsr_mode[1]),
    .rx_data (rx_data[1]), .rx_strobe (rx_strobe[1]), .start_btn (start_btn[1]),
    .txuart_data (txd[1]), .send_character (send[1]), .tx_complete (txc[1]));

  // ---- observation --------------------------------------------------------
  logic [15:0] enc_in_d [2], enc_out_d [2];
  logic        enc_in_v [2], enc_out_v [2];
  assign enc_in_d[0]  = dut_a.in_dout;
  assign enc_in_v[0]  = !dut_a.in_empty && dut_a.tready_sl;
  assign enc_out_d[0] = dut_a.tdata_ma;
  assign enc_out_v[0] = dut_a.tvalid_ma && dut_a.tready_ma;
  assign enc_in_d[1]  = dut_c.in_dout;
  assign enc_in_v[1]  = !dut_c.in_empty && dut_c.tready_sl;
  assign enc_out_d[1] = dut_c.tdata_ma;
  assign enc_out_v[1] = dut_c.tvalid_ma && dut_c.tready_ma;

  logic [15:0] exp_in [2][$];
  logic [63:0] misr [2];
  int          n_in [2], n_out [2], bad_in [2];
  string       text [2];

  for (genvar g = 0; g < 2; g++) begin : g_obs
    always @(posedge clk) if (rst_n) begin
      if (enc_in_v[g]) begin
        n_in[g]++;
        if (exp_in[g].size() == 0 || exp_in[g][0] !== enc_in_d[g]) bad_in[g]++;
        if (exp_in[g].size() != 0) void'(exp_in[g].pop_front());
      end
      if (enc_out_v[g]) begin
        logic b;
        n_out[g]++;
        b = misr[g][63] ^ misr[g][3] ^ misr[g][2] ^ misr[g][0];
        misr[g] = {misr[g][62:0], b} ^ {48'b0, enc_out_d[g]};
      end
    end
    // serial transmitter model
    initial begin
      txc[g] = 0;
      forever begin
        @(posedge clk);
        if (send[g]) begin
          text[g] = {text[g], string'(txd[g])};
          repeat (2) @(posedge clk);
          @(negedge clk) txc[g] = 1;
          @(negedge clk) txc[g] = 0;
        end
      end
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

  // runs one test on harness g; ntf frames of in_wpf words, CADUs of out_wpf
  task automatic run(int g, bit mode, int ntf, int in_wpf, int out_wpf, ref int mech);
    int n, cyc, cyc_min, cyc_max;
    logic [31:0] st;
    string e, sig_hex;
    exp_in[g].delete(); misr[g] = '0; n_in[g] = 0; n_out[g] = 0; bad_in[g] = 0;
    if (mode) begin
      st = '1;
      for (int i = 0; i < ntf * in_wpf; i++) exp_in[g].push_back(lfsr_word(st));
    end
    // ready message first
    n = 0;
    while (text[g].len() < 5 && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (text[g] != "RDY\r\n") begin failures++; $display("ready message '%s'", text[g]); end
    text[g] = "";
    if (mode) begin
      repeat (300) @(negedge clk);                     // source fills the FIFO
      checks++;
      if (n_out[g] != 0) failures++;                   // nothing leaves before the start
      // bouncing button press
      for (int i = 0; i < 5; i++) begin
        if (g == 0) start_btn[0] = ~start_btn[0]; else start_btn[1] = ~start_btn[1];
        repeat (3) @(negedge clk);
      end
      mech++;
    end else begin
      for (int i = 0; i < ntf * in_wpf; i++) begin
        logic [15:0] w = 16'($urandom);
        exp_in[g].push_back(w);
        for (int b = 0; b < 2; b++) begin
          if (g == 0) begin rx_data[0] = b ? w[7:0] : w[15:8]; rx_strobe[0] = 1; end
          else        begin rx_data[1] = b ? w[7:0] : w[15:8]; rx_strobe[1] = 1; end
          @(negedge clk);
          if (g == 0) rx_strobe[0] = 0; else rx_strobe[1] = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      mech++;
    end
    n = 0;
    while (!(text[g].len() > 2 && text[g].substr(text[g].len() - 1, text[g].len() - 1) == "\n")
           && n < 400000) begin
      @(negedge clk); n++;
    end
    cyc = (g == 0) ? int'(dut_a.encode_cycles) : int'(dut_c.encode_cycles);
    cyc_min = ntf * out_wpf;
    cyc_max = ntf * (out_wpf + 1) + 80;
    sig_hex = $sformatf("%016h", misr[g]);
    sig_hex = sig_hex.toupper();
    e = $sformatf("CYCLES TO ENCODE %0d FRAMES : %06d SIGNATURE IS:%s\r\n", ntf, cyc, sig_hex);
    checks += 5;
    if (text[g] != e) begin failures++; $display("got '%s'\nexpected '%s'", text[g], e); end
    if (n_in[g] != ntf * in_wpf || bad_in[g] != 0) begin
      failures++; $display("harness %0d mode %0d: %0d input words, %0d wrong", g, mode, n_in[g], bad_in[g]);
    end
    if (n_out[g] != ntf * out_wpf) begin failures++; $display("harness %0d: %0d CADU words", g, n_out[g]); end
    if (cyc < cyc_min || cyc > cyc_max) begin
      failures++; $display("harness %0d mode %0d: %0d cycles, expected %0d..%0d", g, mode, cyc, cyc_min, cyc_max);
    end
    if (misr[g] == '0) failures++;
    $display("harness %0d mode %0d: %0d frames in %0d cycles (%0d words per CADU), signature %s",
             g, mode, ntf, cyc, out_wpf, sig_hex);
  endtask

  int n_serial, n_lfsr;
  initial begin
    for (int g = 0; g < 2; g++) begin
      rx_data[g] = 0; rx_strobe[g] = 0; start_btn[g] = 0; lfsr_mode[g] = 0; text[g] = "";
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 0, 3, 64, 132, n_serial);
    rst_n = 0; lfsr_mode[0] = 1; text[0] = ""; text[1] = ""; @(negedge clk); rst_n = 1;     // mode switch
    run(0, 1, 4, 64, 132, n_lfsr);
    run(1, 0, 2, 446, 512, n_serial);
    checks += 2;
    if (n_serial == 0) failures++;
    if (n_lfsr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
