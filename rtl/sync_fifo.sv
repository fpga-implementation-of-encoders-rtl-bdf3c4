// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the systematic FIFO of the AR4JA control and buffer unit, where it
// holds the incoming words until the encoder has gathered enough data for all
// PRCE branches, and as the input and output FIFOs of the hardware test
// system. DEPTH words of W bits, held in a register array; a power-of-two
// DEPTH is not required.
//
// Interface: wr_en writes din when not full, rd_en drops the head word when
// not empty. dout shows the head word combinationally (first-word
// fall-through). count is the number of stored words. Writes and reads in the
// same cycle are both performed.
module sync_fifo #(
  parameter int W     = 16,
  parameter int DEPTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  din,
  input  logic          rd_en,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic          full,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

endmodule
