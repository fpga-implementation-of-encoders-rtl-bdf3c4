// ccsds_ldpc_top: the two CCSDS telemetry LDPC encoders side by side.
//
// ar4ja: deep-space AR4JA family encoder, parametric in block length, rate and
//        the two degrees of parallelism (bus width LA*LM); defaults k = 1024,
//        rate 1/2, LA = 8, LM = 2, i.e. 16-bit buses.
// c2:    near-earth (8160,7136) C2 encoder with 16-bit buses.
// test:  the on-chip test harness (ldpc_test_system) with its own AR4JA
//        encoder (k = 1024, rate 1/2, LA = 8, LM = 2): frames from a serial
//        receiver or an internal LFSR, encoding timed by a cycle counter,
//        output compacted by a 64-bit MISR, results printed through a serial
//        transmitter. The receiver, transmitter and clock generator are
//        outside this design; their signals are ports (ts_*).
// Each has its own AXI4-Stream slave (transfer frames in) and master (CADUs
// out) and shares only the clock and the active-low reset. Both emit CADUs
// (sync marker, codeword, optional randomization) with no framing signals:
// frame boundaries are kept by the encoders' counters.
module ccsds_ldpc_top #(
  parameter int              AR4JA_K    = 1024,
  parameter ldpc_pkg::rate_e AR4JA_RATE = ldpc_pkg::R12,
  parameter int              AR4JA_LA   = 8,
  parameter int              AR4JA_LM   = 2,
  parameter bit              RAND_EN    = 1'b1,
  localparam int AW = AR4JA_LA * AR4JA_LM
) (
  input  logic          aclk,
  input  logic          aresetn,
  // AR4JA encoder
  input  logic [AW-1:0] ar4ja_tdata_sl,
  input  logic          ar4ja_tvalid_sl,
  output logic          ar4ja_tready_sl,
  output logic [AW-1:0] ar4ja_tdata_ma,
  output logic          ar4ja_tvalid_ma,
  input  logic          ar4ja_tready_ma,
  // C2 encoder
  input  logic [15:0]   c2_tdata_sl,
  input  logic          c2_tvalid_sl,
  output logic          c2_tready_sl,
  output logic [15:0]   c2_tdata_ma,
  output logic          c2_tvalid_ma,
  input  logic          c2_tready_ma,
  // test harness
  input  logic          ts_dcm_locked,
  input  logic          ts_lfsr_mode,
  input  logic [7:0]    ts_rx_data,
  input  logic          ts_rx_strobe,
  input  logic          ts_start_btn,
  output logic [7:0]    ts_txuart_data,
  output logic          ts_send_character,
  input  logic          ts_tx_complete
);

  ar4ja_encoder #(
    .K_INFO (AR4JA_K), .RATE (AR4JA_RATE), .LA (AR4JA_LA), .LM (AR4JA_LM),
    .RAND_EN (RAND_EN)
  ) u_ar4ja (
    .aclk, .aresetn,
    .tdata_sl (ar4ja_tdata_sl), .tvalid_sl (ar4ja_tvalid_sl), .tready_sl (ar4ja_tready_sl),
    .tdata_ma (ar4ja_tdata_ma), .tvalid_ma (ar4ja_tvalid_ma), .tready_ma (ar4ja_tready_ma)
  );

  c2_encoder #(.RAND_EN (RAND_EN)) u_c2 (
    .aclk, .aresetn,
    .tdata_sl (c2_tdata_sl), .tvalid_sl (c2_tvalid_sl), .tready_sl (c2_tready_sl),
    .tdata_ma (c2_tdata_ma), .tvalid_ma (c2_tvalid_ma), .tready_ma (c2_tready_ma)
  );

  ldpc_test_system u_test (
    .clk (aclk), .rst_n (aresetn), .dcm_locked (ts_dcm_locked), .lfsr_mode (ts_lfsr_mode),
    .rx_data (ts_rx_data), .rx_strobe (ts_rx_strobe), .start_btn (ts_start_btn),
    .txuart_data (ts_txuart_data), .send_character (ts_send_character),
    .tx_complete (ts_tx_complete)
  );

endmodule
