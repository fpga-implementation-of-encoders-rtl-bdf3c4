// ram_packer: joins pairs of received bytes into 16-bit words for the input
// FIFO of the hardware test system with serial input.
//
// Each rx_strobe delivers one byte. The first byte of a pair is held; the
// second completes the word, which appears on word with word_valid high for
// exactly one cycle, one cycle after the second strobe. The first byte of
// the pair becomes the upper byte, so the word's MSB is the first bit of the
// frame. clear drops a half-filled pair.
//
// The packing of two bytes per word follows the document; the byte order is
// this design's choice.
module ram_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [7:0]  rx_data,
  input  logic        rx_strobe,
  output logic [15:0] word,
  output logic        word_valid
);

  logic [7:0] hi;
  logic       have_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi <= '0; have_hi <= 1'b0; word <= '0; word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (clear) begin
        have_hi <= 1'b0;
      end else if (rx_strobe) begin
        if (have_hi) begin
          word       <= {hi, rx_data};
          word_valid <= 1'b1;
          have_hi    <= 1'b0;
        end else begin
          hi      <= rx_data;
          have_hi <= 1'b1;
        end
      end
    end
  end

endmodule
