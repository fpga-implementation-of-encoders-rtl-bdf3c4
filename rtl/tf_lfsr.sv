// tf_lfsr: pseudo-random source of transfer-frame words for the hardware
// test system with generated input.
//
// A 32-bit Fibonacci LFSR with the primitive polynomial x^32 + x^22 + x^2 +
// x + 1 advances W steps for every word it delivers; the W new bits form the
// word, first new bit in the MSB. Initial state all ones. When lfsr_ce is
// high, rnd holds the current word and the register moves to the next one at
// the clock edge, so the word is consumed in the cycle lfsr_ce is high.
//
// The document only says that an LFSR produces the frames; its length,
// polynomial, seed and word assembly are this design's choices.
module tf_lfsr #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lfsr_ce,
  output logic [W-1:0] rnd
);

  logic [31:0] state, nxt;

  always_comb begin
    nxt = state;
    for (int i = 0; i < W; i++) begin
      rnd[W-1-i] = nxt[31] ^ nxt[21] ^ nxt[1] ^ nxt[0];
      nxt = {nxt[30:0], rnd[W-1-i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '1;
    else if (lfsr_ce) state <= nxt;
  end

endmodule
