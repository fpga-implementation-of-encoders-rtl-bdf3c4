// display_control: prints the test results on the operator's terminal, one
// character at a time through the serial transmitter.
//
// On rdy it clears the MISR (misr_reset, one cycle) and prints "RDY" and a
// line break. When encode_fin is high and the decimal cycle count is ready
// (bcd_done) it prints, once,
//   CYCLES TO ENCODE <frames> FRAMES : <cycles> SIGNATURE IS:<16 hex digits>
// followed by a line break. The frame count is printed without leading zeros,
// the cycle count with all its digits, the signature MSB first.
// Each character is presented on txuart_data with send_character high for
// one cycle; the next one waits for tx_complete from the transmitter.
//
// The message text follows the sample output in the document; the character
// handshake and the line breaks are this design's choices.
module display_control #(
  parameter int CDIG = 6,     // cycle-count digits
  parameter int FDIG = 4      // frame-count digits
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rdy,
  input  logic            encode_fin,
  input  logic            bcd_done,
  input  logic [4*CDIG-1:0] cycles_bcd,
  input  logic [4*FDIG-1:0] frames_bcd,
  input  logic [63:0]     signature,
  output logic [7:0]      txuart_data,
  output logic            send_character,
  input  logic            tx_complete,
  output logic            misr_reset
);

  // message texts, first character in the most significant byte
  localparam int L1 = 17, L2 = 10, L3 = 14, LR = 3;
  localparam logic [8*L1-1:0] T1 = "CYCLES TO ENCODE ";
  localparam logic [8*L2-1:0] T2 = " FRAMES : ";
  localparam logic [8*L3-1:0] T3 = " SIGNATURE IS:";
  localparam logic [8*LR-1:0] TR = "RDY";
  localparam int P1 = L1;
  localparam int P2 = P1 + FDIG;
  localparam int P3 = P2 + L2;
  localparam int P4 = P3 + CDIG;
  localparam int P5 = P4 + L3;
  localparam int P6 = P5 + 16;
  localparam int LEN_RES = P6 + 2;
  localparam int LEN_RDY = LR + 2;
  localparam int IW = $clog2(LEN_RES + 1);

  function automatic logic [7:0] hexchar(logic [3:0] v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h37 + 8'(v);
  endfunction

  typedef enum logic [1:0] {IDLE, SEND, WAIT} state_e;
  state_e        state;
  logic          msg;       // 0: ready message, 1: result line
  logic          reported;
  logic [IW-1:0] idx;
  logic [7:0]    ch;
  logic          skip;      // leading zero of the frame count: not printed
  logic          lead;      // still within the leading zeros of the frame count
  logic          last;

  // character idx of the current message
  always_comb begin
    ch   = 8'h20;
    skip = 1'b0;
    if (!msg) begin
      if (int'(idx) < LR)       ch = TR[8*(LR-1-int'(idx)) +: 8];
      else if (int'(idx) == LR) ch = 8'h0D;
      else                            ch = 8'h0A;
    end else if (int'(idx) < P1) begin
      ch = T1[8*(L1-1-int'(idx)) +: 8];
    end else if (int'(idx) < P2) begin
      ch   = 8'h30 + 8'(frames_bcd[4*(FDIG-1-(int'(idx)-P1)) +: 4]);
      skip = lead && (ch == 8'h30) && (int'(idx) != P2 - 1);
    end else if (int'(idx) < P3) begin
      ch = T2[8*(L2-1-(int'(idx)-P2)) +: 8];
    end else if (int'(idx) < P4) begin
      ch = 8'h30 + 8'(cycles_bcd[4*(CDIG-1-(int'(idx)-P3)) +: 4]);
    end else if (int'(idx) < P5) begin
      ch = T3[8*(L3-1-(int'(idx)-P4)) +: 8];
    end else if (int'(idx) < P6) begin
      ch = hexchar(signature[4*(15-(int'(idx)-P5)) +: 4]);
    end else if (int'(idx) == P6) begin
      ch = 8'h0D;
    end else begin
      ch = 8'h0A;
    end
  end

  assign last = msg ? (int'(idx) == LEN_RES - 1) : (int'(idx) == LEN_RDY - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; msg <= 1'b0; reported <= 1'b0; idx <= '0; lead <= 1'b1;
      txuart_data <= '0; send_character <= 1'b0; misr_reset <= 1'b0;
    end else begin
      send_character <= 1'b0;
      misr_reset     <= 1'b0;
      unique case (state)
        IDLE: begin
          idx  <= '0;
          lead <= 1'b1;
          if (rdy) begin
            misr_reset <= 1'b1;
            reported   <= 1'b0;
            msg        <= 1'b0;
            state      <= SEND;
          end else if (encode_fin && bcd_done && !reported) begin
            reported <= 1'b1;
            msg      <= 1'b1;
            state    <= SEND;
          end
        end
        SEND: begin
          if (skip) begin
            idx <= idx + 1'b1;
          end else begin
            if (msg && int'(idx) >= P1 && int'(idx) < P2) lead <= 1'b0;
            txuart_data    <= ch;
            send_character <= 1'b1;
            state          <= WAIT;
          end
        end
        WAIT: begin
          if (tx_complete) begin
            idx   <= idx + 1'b1;
            state <= last ? IDLE : SEND;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
