// c2_ctrl: control unit of the C2 (8160,7136) encoder, 16-bit buses.
//
// The C2 frame is 7136 bits (446 words); 18 zeros are prepended for encoding
// and the 7154 bits fall into 14 circulants of 511 bits. The unit feeds the
// PRCE 16 bits per step, 32 steps per circulant, the last slot of each
// circulant being a forced zero (31*16 + 15 = 511). To keep word boundaries
// and circulant boundaries apart it uses a variable-length alignment buffer
// of N bits (N = 2..15): each step takes the N bits saved from the previous
// word and the first 16-N bits of the current word. N starts at 2, standing
// for the last two prepended zeros (the first 16 zeros need no step at all,
// their effect is a rotation absorbed by the function generators), and grows
// by one at each circulant boundary, where only 15-N fresh bits are taken and
// a zero is added. After the last word N = 15 and one extra step
// (SYS_EMPTY_BUF) empties the buffer; it is the one idle output cycle of each
// 513-cycle CADU.
//
// FSM: IDLE -> ASM_1 -> ASM_2 -> SYST (446 words, input passed straight to the
// output and to the PRCE) -> SYS_EMPTY_BUF -> HALT (64 parity words: 1022
// parity bits and the two fill zeros) -> ASM_1 when the next frame is already
// offered, IDLE otherwise. TREADY_SL is high only in SYST (gated by ce, the
// master's flow control), so a sender waits with TVALID high before IDLE is
// left; this is allowed by AXI4-Stream.
//
// Outputs as in ar4ja_ctrl_buffer: sys_valid/systematic for ASM and
// systematic words, par_valid/par_sel for parity words, rand_en/rand_init for
// the randomizer, s_feed/row/mac_en/reset_prce for the PRCE.
module c2_ctrl (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             tvalid_sl,
  output logic             tready_sl,
  input  logic [15:0]      tdata_sl,
  output logic [0:0][15:0] s_feed,
  output logic [3:0]       row,
  output logic             mac_en,
  output logic             reset_prce,
  output logic             sys_valid,
  output logic [15:0]      systematic,
  output logic             par_valid,
  output logic [5:0]       par_sel,
  output logic             rand_en,
  output logic             rand_init
);
  import ldpc_pkg::*;

  localparam int NW = C2_K / C2_W;                                  // 446
  localparam int NP = (2 * C2_M + C2_FILL) / C2_W;                  // 64

  typedef enum logic [2:0] {IDLE, ASM_1, ASM_2, SYST, SYS_EMPTY_BUF, HALT} state_e;

  state_e      state;
  logic [8:0]  wcnt;      // words of the frame received
  logic [5:0]  pcnt;      // parity words sent
  logic [14:0] abuf;      // alignment buffer, valid bits abuf[N-1:0]
  logic [3:0]  nbuf;      // N
  logic [3:0]  rowreg;    // circulant row being processed
  logic [4:0]  cstep;     // step within the circulant
  logic        accept, step, last_slot, to_next;
  logic [15:0] cur;
  logic [30:0] x;

  assign tready_sl = ce && (state == SYST);
  assign accept    = tvalid_sl && tready_sl;
  assign step      = accept || (ce && state == SYS_EMPTY_BUF);
  assign last_slot = (cstep == 5'd31);
  assign cur       = (state == SYST) ? tdata_sl : 16'h0000;
  assign x         = {abuf, cur};
  assign to_next   = tvalid_sl;

  always_comb begin
    if (last_slot) s_feed[0] = {x[int'(nbuf) + 1 +: 15], 1'b0};
    else           s_feed[0] = x[int'(nbuf) +: 16];
  end

  always_comb begin
    mac_en     = step;
    sys_valid  = 1'b0;
    systematic = tdata_sl;
    par_valid  = 1'b0;
    rand_en    = 1'b0;
    rand_init  = 1'b0;
    case (state)
      ASM_1:   begin sys_valid = ce; systematic = C2_ASM[31:16]; rand_init = 1'b1; end
      ASM_2:   begin sys_valid = ce; systematic = C2_ASM[15:0];  rand_init = 1'b1; end
      SYST:    begin sys_valid = accept; rand_en = accept; end
      HALT:    begin par_valid = ce; rand_en = ce; end
      default: ;
    endcase
  end

  assign row        = rowreg;
  assign par_sel    = pcnt;
  assign reset_prce = ce && (state == HALT) && (int'(pcnt) == NP - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      wcnt   <= '0;
      pcnt   <= '0;
      abuf   <= '0;
      nbuf   <= 4'(C2_ZEROS % 16);
      cstep  <= 5'd1;
      rowreg <= '0;
    end else if (ce) begin
      if (step) begin
        if (last_slot) begin
          abuf   <= cur[14:0] & 15'((32'd1 << (int'(nbuf) + 1)) - 32'd1);
          nbuf   <= nbuf + 1'b1;
          cstep  <= '0;
          rowreg <= rowreg + 1'b1;
        end else begin
          abuf   <= cur[14:0] & 15'((32'd1 << int'(nbuf)) - 32'd1);
          cstep  <= cstep + 1'b1;
        end
      end
      case (state)
        IDLE:  if (tvalid_sl) state <= ASM_1;
        ASM_1: state <= ASM_2;
        ASM_2: state <= SYST;
        SYST:
          if (accept) begin
            if (int'(wcnt) == NW - 1) begin
              wcnt  <= '0;
              state <= SYS_EMPTY_BUF;
            end else wcnt <= wcnt + 1'b1;
          end
        SYS_EMPTY_BUF: state <= HALT;
        HALT: begin
          if (int'(pcnt) == NP - 1) begin
            pcnt   <= '0;
            state  <= to_next ? ASM_1 : IDLE;
            abuf   <= '0;
            nbuf   <= 4'(C2_ZEROS % 16);
            cstep  <= 5'd1;
            rowreg <= '0;
          end else pcnt <= pcnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
