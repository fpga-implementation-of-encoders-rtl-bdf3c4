// ccsds_randomizer: parallel CCSDS pseudo-random sequence generator.
//
// Generates W bits per cycle of the sequence defined by
// h(x) = x^8 + x^7 + x^5 + x^3 + 1, an 8-bit Fibonacci LFSR that starts from
// all ones at the beginning of every codeword and repeats every 255 bits.
// The register shifts towards bit 0, the sequence is read from bit 0 and the
// feedback (XOR of bits 7, 5, 3 and 0) enters bit 7. For W bits per cycle the
// register is unrolled into W successive 8-bit states; bit 0 of state i is
// sequence bit i, so the first eight bits need no extra XOR gates.
//
// Interface: init reloads all ones (the next rnd word then holds the first W
// bits of the sequence); adv moves to the next W bits. rnd[W-1] is the bit
// that is transmitted first. ce freezes the generator (output stall).
// Timing: rnd is combinational from the state register, valid the cycle after
// init or adv.
module ccsds_randomizer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic         init,
  input  logic         adv,
  output logic [W-1:0] rnd
);

  logic [7:0] state;
  logic [7:0] arr [W+1];

  always_comb begin
    arr[0] = state;
    for (int i = 1; i <= W; i++) begin
      arr[i] = {arr[i-1][7] ^ arr[i-1][5] ^ arr[i-1][3] ^ arr[i-1][0],
                arr[i-1][7:1]};
    end
    for (int i = 0; i < W; i++) rnd[W-1-i] = arr[i][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state <= 8'hFF;
    else if (ce) begin
      if (init)          state <= 8'hFF;
      else if (adv)      state <= arr[W];
    end
  end

endmodule
