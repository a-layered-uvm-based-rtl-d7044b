// spw_transmitter: SpaceWire character layer, transmit side.
//
// Chooses the next character to send for the current link state and hands
// it to the line encoder one bit at a time. In Started only NULLs are sent;
// in Connecting FCTs (when the credit logic allows one) and NULLs; in Run,
// in order of priority, a Time code (after tick_in), an FCT, an N-Char
// (when there is transmit credit and the user offers one) or else a NULL.
// The characters sent per state are the document's; the priority order is
// this design's choice.
//
// Each character is built with its parity bit: odd parity over the data
// bits of the previous character plus the parity bit and control flag of
// this one. NULL and Time code are sent as ESC followed by FCT or by a data
// character, each with its own parity bit. The character is shifted out
// least-significant (first-sent) bit first; the choice of the next
// character happens in the cycle the encoder takes its first bit.
//
// Interface: user N-Chars on tx_valid/tx_char, accepted when tx_ready
// pulses; tick_in with time_in requests a Time code. fct_sent and
// nchar_sent pulse when an FCT or N-Char is started, for the credit logic.
module spw_transmitter
  import spw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  link_state_e state,
  input  logic        enable,     // transmitter released from reset
  input  logic        bit_take,   // encoder takes bit_out this cycle
  output logic        bit_out,
  input  logic        can_send,   // transmit credit available
  input  logic        fct_ok,     // room for another FCT's worth of N-Chars
  input  logic        tx_valid,
  input  nchar_t      tx_char,
  output logic        tx_ready,
  input  logic        tick_in,
  input  logic [7:0]  time_in,
  output logic        fct_sent,
  output logic        nchar_sent,
  output logic        time_sent
);
  typedef enum logic [2:0] {
    SEL_NULL, SEL_FCT, SEL_NCHAR, SEL_TIME
  } sel_e;

  logic [13:0] sr;          // bits still to send, sr[0] next
  logic [3:0]  left;        // number of bits in sr
  logic        prev_par;    // xor of the data bits of the last character
  logic        tick_pend;
  logic [7:0]  time_q;

  sel_e        sel;
  logic [13:0] nxt_bits;
  logic [3:0]  nxt_len;
  logic        nxt_par;
  logic        load;

  // Pick the next character.
  always_comb begin
    sel = SEL_NULL;
    unique case (state)
      ST_CONNECTING: if (fct_ok) sel = SEL_FCT;
      ST_RUN:
        if (tick_pend)                 sel = SEL_TIME;
        else if (fct_ok)               sel = SEL_FCT;
        else if (tx_valid && can_send) sel = SEL_NCHAR;
      default: sel = SEL_NULL;
    endcase
  end

  // Build its bits: index 0 is sent first.
  always_comb begin
    nxt_bits = '0;
    nxt_len  = 4'd4;
    nxt_par  = prev_par;
    unique case (sel)
      SEL_NULL: begin
        // ESC (P,1,1,1) then FCT (P,1,0,0); ESC's two code bits are even
        nxt_bits[3:0] = {CODE_ESC, 1'b1, prev_par};
        nxt_bits[7:4] = {CODE_FCT, 1'b1, 1'b0};
        nxt_len  = 4'd8;
        nxt_par  = 1'b0;
      end
      SEL_FCT: begin
        nxt_bits[3:0] = {CODE_FCT, 1'b1, prev_par};
        nxt_len  = 4'd4;
        nxt_par  = 1'b0;
      end
      SEL_NCHAR: begin
        if (tx_char.flag) begin
          nxt_bits[3:0] = {(tx_char.data[0] ? CODE_EEP : CODE_EOP), 1'b1, prev_par};
          nxt_len  = 4'd4;
          nxt_par  = 1'b1;
        end else begin
          nxt_bits[9:0] = {tx_char.data, 1'b0, ~prev_par};
          nxt_len  = 4'd10;
          nxt_par  = ^tx_char.data;
        end
      end
      SEL_TIME: begin
        nxt_bits[3:0]  = {CODE_ESC, 1'b1, prev_par};
        nxt_bits[13:4] = {time_q, 1'b0, 1'b1};
        nxt_len  = 4'd14;
        nxt_par  = ^time_q;
      end
      default: ;
    endcase
  end

  assign load       = enable && bit_take && (left == '0);
  assign bit_out    = (left == '0) ? nxt_bits[0] : sr[0];
  assign tx_ready   = load && (sel == SEL_NCHAR);
  assign nchar_sent = tx_ready;
  assign fct_sent   = load && (sel == SEL_FCT);
  assign time_sent  = load && (sel == SEL_TIME);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr        <= '0;
      left      <= '0;
      prev_par  <= 1'b0;
      tick_pend <= 1'b0;
      time_q    <= '0;
    end else begin
      if (tick_in) begin
        tick_pend <= 1'b1;
        time_q    <= time_in;
      end else if (time_sent) begin
        tick_pend <= 1'b0;
      end
      if (!enable) begin
        sr       <= '0;
        left     <= '0;
        prev_par <= 1'b0;
      end else if (load) begin
        sr       <= nxt_bits >> 1;
        left     <= nxt_len - 1'b1;
        prev_par <= nxt_par;
      end else if (bit_take) begin
        sr   <= sr >> 1;
        left <= left - 1'b1;
      end
    end
  end
endmodule
