// ldpc_misr: multiple-input signature register that compacts the encoder's
// output words into a 64-bit signature for the hardware test system.
//
// The register is a 64-bit Fibonacci LFSR shifting toward the high end: the
// feedback bit (XOR of the taps of x^64 + x^4 + x^3 + x + 1, i.e. bits 63, 3,
// 2 and 0) enters bit 0, and the W-bit input word is XORed into the low W bits
// in the same step. One step per cycle while ce is high; rst clears the
// signature synchronously and rst_n asynchronously.
//
// Follows the description of a 64-bit Fibonacci-type MISR. The degree-64
// feedback polynomial, the injection of the word into the low bits and the
// zero start value are this design's choices, so signatures are not
// comparable with those of other test setups.
module ldpc_misr #(
  parameter int W = 16,
  parameter int N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rst,       // synchronous clear (misr_reset)
  input  logic         ce,        // absorb misr_in this cycle
  input  logic [W-1:0] misr_in,
  output logic [N-1:0] sig
);

  logic fb;
  assign fb = sig[N-1] ^ sig[3] ^ sig[2] ^ sig[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (rst) sig <= '0;
    else if (ce)  sig <= {sig[N-2:0], fb} ^ N'(misr_in);
  end

endmodule
