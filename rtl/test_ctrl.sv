// test_ctrl: control unit of the hardware test system that runs a fixed
// number of transfer frames through the encoder and measures how many clock
// cycles the encoding takes.
//
// States:
//   LOCK - wait for the clock generator to lock (dcm_locked);
//   RDY  - one-cycle rdy pulse, which makes the display unit print its ready
//          message and clear the MISR;
//   LOAD - fill the input FIFO. Serial mode (lfsr_mode = 0): words from the
//          byte packer are accepted (accept) until IN_WORDS_TOTAL are stored,
//          then encoding starts by itself. Generator mode (lfsr_mode = 1):
//          the LFSR fills the FIFO (lfsr_ce while not full) and encoding
//          starts on start_pulse from the debounced button;
//   RUN  - tready_ma is raised so the encoder runs; encode_cycles counts every
//          cycle. In generator mode the LFSR keeps refilling the FIFO until
//          all frames have been produced. RUN ends when all OUT_WORDS_TOTAL
//          CADU words have left the encoder and both FIFOs are empty;
//   FIN  - encode_fin stays high; results are converted and printed.
// The number of frames per mode is a constant of the design, as in the
// document (960 with serial input and 5000 with generated input by default).
// Counting written and produced words, rather than reading the FIFO's fill
// counter, is this design's choice: the encoder may already draw words from
// the FIFO while it is held by tready_ma.
module test_ctrl #(
  parameter int IN_WPF   = 64,     // input words per transfer frame
  parameter int OUT_WPF  = 132,    // output words per CADU
  parameter int NTF_UART = 960,
  parameter int NTF_LFSR = 5000,
  parameter int CYC_BITS = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dcm_locked,
  input  logic                lfsr_mode,
  input  logic                start_pulse,
  input  logic                fifoin_wen,     // a word is being written to the input FIFO
  input  logic                fifoin_full,
  input  logic                fifo_in_empty,
  input  logic                fifo_out_empty,
  input  logic                tvalid_ma,
  output logic                tready_ma,
  output logic                accept,         // serial mode: packer words may be written
  output logic                lfsr_ce,
  output logic                rdy,
  output logic [CYC_BITS-1:0] encode_cycles,
  output logic                encode_fin
);

  localparam int NMAX = (NTF_UART > NTF_LFSR) ? NTF_UART : NTF_LFSR;
  localparam int CW   = $clog2(NMAX * OUT_WPF + 1);

  typedef enum logic [2:0] {LOCK, RDY, LOAD, RUN, FIN} state_e;
  state_e state;

  logic [CW-1:0] in_words, out_words, in_total, out_total;
  assign in_total  = lfsr_mode ? CW'(NTF_LFSR * IN_WPF)  : CW'(NTF_UART * IN_WPF);
  assign out_total = lfsr_mode ? CW'(NTF_LFSR * OUT_WPF) : CW'(NTF_UART * OUT_WPF);

  assign rdy        = (state == RDY);
  assign tready_ma  = (state == RUN);
  assign encode_fin = (state == FIN);
  assign accept     = !lfsr_mode && (state == LOAD) && (in_words != in_total);
  assign lfsr_ce    = lfsr_mode && (state == LOAD || state == RUN) && !fifoin_full &&
                      (in_words != in_total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOCK; in_words <= '0; out_words <= '0; encode_cycles <= '0;
    end else begin
      if (fifoin_wen && !fifoin_full) in_words <= in_words + 1'b1;
      if (tvalid_ma && tready_ma)     out_words <= out_words + 1'b1;
      unique case (state)
        LOCK: if (dcm_locked) state <= RDY;
        RDY: begin
          in_words <= '0; out_words <= '0; encode_cycles <= '0;
          state <= LOAD;
        end
        LOAD: begin
          if (lfsr_mode ? start_pulse : (in_words == in_total)) state <= RUN;
        end
        RUN: begin
          encode_cycles <= encode_cycles + 1'b1;
          if (out_words == out_total && fifo_in_empty && fifo_out_empty) state <= FIN;
        end
        FIN: ;
        default: state <= LOCK;
      endcase
    end
  end

endmodule
