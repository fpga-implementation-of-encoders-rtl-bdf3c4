// bin2bcd: converts the encoding cycle count into decimal digits for the
// operator's terminal.
//
// Sequential shift-and-add-3 (double dabble): on start the binary value is
// loaded, then for BITS cycles every BCD digit of 5 or more gets 3 added and
// the whole register shifts left by one, taking the next binary bit. done
// rises with the final digits on bcd (digit 0, the units, in bcd[3:0]) and
// stays high until the next start. Values that need more than DIGITS digits
// lose their high digits.
//
// The document states only that the count is converted to BCD; the algorithm
// is this design's choice.
module bin2bcd #(
  parameter int BITS   = 20,
  parameter int DIGITS = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [BITS-1:0]     bin,
  output logic [4*DIGITS-1:0] bcd,
  output logic                done
);

  logic [BITS-1:0]           sh;
  logic [$clog2(BITS+1)-1:0] n;
  logic                      busy;
  logic [4*DIGITS-1:0]       adj;

  always_comb begin
    for (int d = 0; d < DIGITS; d++)
      adj[4*d +: 4] = (bcd[4*d +: 4] >= 4'd5) ? bcd[4*d +: 4] + 4'd3 : bcd[4*d +: 4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; n <= '0; busy <= 1'b0; bcd <= '0; done <= 1'b0;
    end else if (start) begin
      sh <= bin; n <= '0; busy <= 1'b1; bcd <= '0; done <= 1'b0;
    end else if (busy) begin
      bcd <= (adj << 1) | (4*DIGITS)'(sh[BITS-1]);
      sh  <= sh << 1;
      n   <= n + 1'b1;
      if (n == ($clog2(BITS+1))'(BITS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
