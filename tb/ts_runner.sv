// ts_runner: drives one instance of the test harness through a complete run
// and checks it. In serial mode it sends NTF frames of random bytes; in
// generated mode it presses a bouncing start button. It checks the words
// entering the encoder (the bytes sent, or a bit-serial LFSR model), the
// number of CADU words, and the printed line: frame count, cycle count
// (between NTF * OUT_WPF and NTF * (OUT_WPF + 1) + 100) and a signature
// computed here with a MISR model over the encoder's output words.
module ts_runner #(
  parameter bit              USE_C2  = 1'b0,
  parameter ldpc_pkg::rate_e RATE    = ldpc_pkg::R12,
  parameter int              LA      = 8,
  parameter int              LM      = 2,
  parameter bit              MODE    = 1'b0,     // 0 serial, 1 generated
  parameter int              NTF     = 4,
  parameter int              REF_CYC = 0         // cycle count reported for the reference hardware
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int M_AR    = ldpc_pkg::ar4ja_gsize(1024, RATE);
  localparam int IN_WPF  = USE_C2 ? 446 : 64;
  localparam int OUT_WPF = USE_C2 ? 512 : (64 + 1024 + 8 * M_AR) / 16;

  logic [7:0] rx_data = '0, txd;
  logic       rx_strobe = 1'b0, btn = 1'b0, send, txc = 1'b0;

  ldpc_test_system #(.USE_C2 (USE_C2), .AR4JA_RATE (RATE), .AR4JA_LA (LA), .AR4JA_LM (LM),
                     .NTF_UART (NTF), .NTF_LFSR (NTF), .DEBOUNCE (8)) u_ts (
    .clk, .rst_n, .dcm_locked (1'b1), .lfsr_mode (MODE), .rx_data, .rx_strobe,
    .start_btn (btn), .txuart_data (txd), .send_character (send), .tx_complete (txc));

  logic [15:0] exp_q [$];
  logic [63:0] misr = '0;
  int          n_in = 0, n_out = 0, bad = 0;
  string       text = "";

  always @(posedge clk) if (rst_n) begin
    if (!u_ts.in_empty && u_ts.tready_sl) begin
      n_in++;
      if (exp_q.size() == 0 || exp_q[0] !== u_ts.in_dout) bad++;
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (u_ts.tvalid_ma && u_ts.tready_ma) begin
      logic b;
      n_out++;
      b = misr[63] ^ misr[3] ^ misr[2] ^ misr[0];
      misr = {misr[62:0], b} ^ {48'b0, u_ts.tdata_ma};
    end
  end
  initial forever begin
    @(posedge clk);
    if (send) begin
      text = {text, string'(txd)};
      @(negedge clk) txc = 1;
      @(negedge clk) txc = 0;
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

  initial begin
    int n, cyc;
    logic [31:0] st;
    string e, h;
    done = 0; checks = 0; failures = 0;
    if (MODE) begin
      st = '1;
      for (int i = 0; i < NTF * IN_WPF; i++) exp_q.push_back(lfsr_word(st));
    end
    @(posedge rst_n);
    n = 0;
    while (text.len() < 5 && n < 1000) begin @(negedge clk); n++; end
    checks++;
    if (text != "RDY\r\n") failures++;
    text = "";
    if (MODE) begin
      repeat (1000) @(negedge clk);
      for (int i = 0; i < 5; i++) begin btn = ~btn; repeat (3) @(negedge clk); end
    end else begin
      for (int i = 0; i < NTF * IN_WPF; i++) begin
        logic [15:0] w;
        w = 16'($urandom);
        exp_q.push_back(w);
        rx_data = w[15:8]; rx_strobe = 1; @(negedge clk);
        rx_data = w[7:0];  @(negedge clk);
        rx_strobe = 0;
      end
    end
    n = 0;
    while (!(text.len() > 2 && text.substr(text.len() - 1, text.len() - 1) == "\n") && n < 2000000) begin
      @(negedge clk); n++;
    end
    cyc = int'(u_ts.encode_cycles);
    h = $sformatf("%016h", misr);
    h = h.toupper();
    e = $sformatf("CYCLES TO ENCODE %0d FRAMES : %06d SIGNATURE IS:%s\r\n", NTF, cyc, h);
    checks += 4;
    if (text != e) begin failures++; $display("printed '%s'\nexpected '%s'", text, e); end
    if (n_in != NTF * IN_WPF || bad != 0) begin failures++; $display("%0d input words, %0d wrong", n_in, bad); end
    if (n_out != NTF * OUT_WPF) begin failures++; $display("%0d CADU words", n_out); end
    if (cyc < NTF * OUT_WPF || cyc > NTF * (OUT_WPF + 1) + 100) begin failures++; $display("%0d cycles", cyc); end
    $display("%s rate %0d LA=%0d LM=%0d, %s input: %0d frames in %0d cycles (reference hardware: %0d)",
             USE_C2 ? "C2" : "AR4JA", RATE, LA, LM, MODE ? "generated" : "serial", NTF, cyc, REF_CYC);
    done = 1;
  end
endmodule
