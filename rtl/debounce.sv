// debounce: turns the bouncing level of a push-button into one clean pulse.
//
// The button is first brought into the clock domain by two flip-flops. A
// counter then requires the synchronised level to stay unchanged for STABLE
// consecutive cycles before the debounced level follows it; start_pulse is
// high for one cycle when the debounced level rises.
//
// The document only names a debouncing circuit for the start button; the
// method and the STABLE default (1 ms at 100 MHz would be 100000; a smaller
// default keeps simulations short) are this design's choices.
module debounce #(
  parameter int STABLE = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  logic btn,
  output logic start_pulse
);

  localparam int CW = $clog2(STABLE + 1);
  logic [1:0]    sync;
  logic          level;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0; level <= 1'b0; cnt <= '0; start_pulse <= 1'b0;
    end else begin
      sync        <= {sync[0], btn};
      start_pulse <= 1'b0;
      if (sync[1] == level) begin
        cnt <= '0;
      end else if (cnt == CW'(STABLE - 1)) begin
        cnt         <= '0;
        level       <= sync[1];
        start_pulse <= sync[1];
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
