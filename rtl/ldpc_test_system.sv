// ldpc_test_system: on-chip test harness that measures an encoder's real
// throughput and compacts its output into a signature for the operator.
//
// Data path: a frame source fills the input FIFO (FIFOIN); the encoder reads
// it through its AXI4-Stream slave; its CADU words go to the output FIFO
// (FIFOOUT), which is read every cycle into the 64-bit MISR. The control
// unit (test_ctrl) holds the encoder's TREADY_MA low until the input is
// ready, then counts the cycles until every CADU has been absorbed. The
// count is converted to decimal (bin2bcd) and printed with the frame count
// and the MISR signature by display_control through a serial transmitter
// outside this module (txuart_data / send_character / tx_complete).
//
// Frame sources, selected by lfsr_mode:
//   0 - serial input: bytes from a UART receiver outside this module
//       (rx_data / rx_strobe) are paired into 16-bit words by ram_packer;
//       NTF_UART frames are loaded, then encoding starts by itself;
//   1 - generated input: tf_lfsr fills the FIFO; encoding starts when the
//       debounced start button is pressed and the LFSR keeps supplying words
//       until NTF_LFSR frames have been produced.
// The encoder bus is 16 bits wide: an AR4JA encoder with LA*LM = 16
// (default k = 1024, rate 1/2, LA = 8, LM = 2) or, with USE_C2, the C2
// encoder. The clock is expected from a clock generator whose lock output
// drives dcm_locked.
//
// The structure follows the document's two test systems (serial and LFSR
// input); combining both frame sources in one system behind a mode input,
// and the depths of the FIFOs beyond what 960 frames need, are this design's
// choices. FIFOIN_DEPTH defaults to all 960 frames of the serial test.
module ldpc_test_system #(
  parameter bit              USE_C2       = 1'b0,
  parameter int              AR4JA_K      = 1024,
  parameter ldpc_pkg::rate_e AR4JA_RATE   = ldpc_pkg::R12,
  parameter int              AR4JA_LA     = 8,
  parameter int              AR4JA_LM     = 2,
  parameter int              NTF_UART     = USE_C2 ? 127 : 960,
  parameter int              NTF_LFSR     = USE_C2 ? 1000 : 5000,
  parameter int              FIFOIN_DEPTH = NTF_UART * (USE_C2 ? 446 : AR4JA_K / 16),
  parameter int              FIFOOUT_DEPTH = 16,
  parameter int              DEBOUNCE     = 1024,
  localparam int CYC_BITS = 20,
  localparam int CDIG     = 6,
  localparam int FDIG     = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dcm_locked,
  input  logic       lfsr_mode,
  // serial receiver side
  input  logic [7:0] rx_data,
  input  logic       rx_strobe,
  // start push-button (generated-input mode)
  input  logic       start_btn,
  // serial transmitter side
  output logic [7:0] txuart_data,
  output logic       send_character,
  input  logic       tx_complete
);

  localparam int M_AR    = ldpc_pkg::ar4ja_gsize(AR4JA_K, AR4JA_RATE);
  localparam int IN_WPF  = USE_C2 ? ldpc_pkg::C2_K / 16 : AR4JA_K / 16;
  localparam int OUT_WPF = USE_C2 ? (32 + 8160) / 16 : (64 + AR4JA_K + 8 * M_AR) / 16;

  function automatic logic [4*FDIG-1:0] to_bcd(int v);
    logic [4*FDIG-1:0] r;
    for (int d = 0; d < FDIG; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction
  localparam logic [4*FDIG-1:0] BCD_UART = to_bcd(NTF_UART);
  localparam logic [4*FDIG-1:0] BCD_LFSR = to_bcd(NTF_LFSR);

  initial begin
    assert (USE_C2 || AR4JA_LA * AR4JA_LM == 16)
      else $error("ldpc_test_system: the encoder bus must be 16 bits wide");
  end

  // ---- frame sources --------------------------------------------------------
  logic [15:0] pk_word, rnd, fifoin_data;
  logic        pk_valid, accept, lfsr_ce, fifoin_wen, start_pulse;

  ram_packer u_packer (
    .clk, .rst_n, .clear (!accept), .rx_data, .rx_strobe,
    .word (pk_word), .word_valid (pk_valid));

  tf_lfsr #(.W (16)) u_lfsr (.clk, .rst_n, .lfsr_ce, .rnd);

  debounce #(.STABLE (DEBOUNCE)) u_debounce (.clk, .rst_n, .btn (start_btn), .start_pulse);

  assign fifoin_wen  = lfsr_mode ? lfsr_ce : (pk_valid && accept);
  assign fifoin_data = lfsr_mode ? rnd : pk_word;

  // ---- FIFOIN -> encoder -> FIFOOUT -----------------------------------------
  logic [15:0] in_dout, tdata_ma, out_dout;
  logic        in_empty, in_full, out_empty, out_full;
  logic        tready_sl, tvalid_ma, tready_ma;

  sync_fifo #(.W (16), .DEPTH (FIFOIN_DEPTH)) u_fifoin (
    .clk, .rst_n, .wr_en (fifoin_wen), .din (fifoin_data),
    .rd_en (tready_sl), .dout (in_dout), .empty (in_empty), .full (in_full), .count ());

  if (USE_C2) begin : g_c2
    c2_encoder u_enc (
      .aclk (clk), .aresetn (rst_n),
      .tdata_sl (in_dout), .tvalid_sl (!in_empty), .tready_sl (tready_sl),
      .tdata_ma (tdata_ma), .tvalid_ma (tvalid_ma), .tready_ma (tready_ma));
  end else begin : g_ar4ja
    ar4ja_encoder #(.K_INFO (AR4JA_K), .RATE (AR4JA_RATE), .LA (AR4JA_LA), .LM (AR4JA_LM)) u_enc (
      .aclk (clk), .aresetn (rst_n),
      .tdata_sl (in_dout), .tvalid_sl (!in_empty), .tready_sl (tready_sl),
      .tdata_ma (tdata_ma), .tvalid_ma (tvalid_ma), .tready_ma (tready_ma));
  end

  sync_fifo #(.W (16), .DEPTH (FIFOOUT_DEPTH)) u_fifoout (
    .clk, .rst_n, .wr_en (tvalid_ma && tready_ma), .din (tdata_ma),
    .rd_en (1'b1), .dout (out_dout), .empty (out_empty), .full (out_full), .count ());

  // FIFOOUT is read every cycle, so it never fills up
  a_out_not_full: assert property (@(posedge clk) disable iff (!rst_n) !out_full);

  // ---- signature ------------------------------------------------------------
  logic [63:0] sig;
  logic        misr_reset;
  ldpc_misr #(.W (16), .N (64)) u_misr (
    .clk, .rst_n, .rst (misr_reset), .ce (!out_empty), .misr_in (out_dout), .sig);

  // ---- control and reporting -------------------------------------------------
  logic [CYC_BITS-1:0] encode_cycles;
  logic                encode_fin, encode_fin_d, rdy, bcd_done;
  logic [4*CDIG-1:0]   cycles_bcd;

  test_ctrl #(.IN_WPF (IN_WPF), .OUT_WPF (OUT_WPF), .NTF_UART (NTF_UART),
              .NTF_LFSR (NTF_LFSR), .CYC_BITS (CYC_BITS)) u_ctrl (
    .clk, .rst_n, .dcm_locked, .lfsr_mode, .start_pulse, .fifoin_wen,
    .fifoin_full (in_full), .fifo_in_empty (in_empty), .fifo_out_empty (out_empty),
    .tvalid_ma, .tready_ma, .accept, .lfsr_ce, .rdy, .encode_cycles, .encode_fin);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) encode_fin_d <= 1'b0;
    else        encode_fin_d <= encode_fin;

  bin2bcd #(.BITS (CYC_BITS), .DIGITS (CDIG)) u_bcd (
    .clk, .rst_n, .start (encode_fin && !encode_fin_d), .bin (encode_cycles),
    .bcd (cycles_bcd), .done (bcd_done));

  display_control #(.CDIG (CDIG), .FDIG (FDIG)) u_disp (
    .clk, .rst_n, .rdy, .encode_fin, .bcd_done, .cycles_bcd,
    .frames_bcd (lfsr_mode ? BCD_LFSR : BCD_UART), .signature (sig),
    .txuart_data, .send_character, .tx_complete, .misr_reset);

endmodule
