// char_decoder: SpaceWire character layer, receive side.
//
// Collects the bits from the line decoder into characters. After the second
// bit of a character (parity P and control flag) the parity rule is checked:
// the data bits of the previous character, P and the flag must hold an odd
// number of ones, otherwise parity_err is raised. The flag then says how many
// bits the character has: 4 for a control character, 10 for a data
// character. A complete control character is FCT, EOP, EEP or ESC; an ESC is
// held and joined with the next character: ESC+FCT is a NULL, ESC+data a
// Time code, and ESC followed by anything else raises esc_err. These steps
// and their order are the document's. The first character is checked as if
// the previous one had zero data bits, and decoding starts at the first
// received bit; both are this design's choices.
//
// Outputs: char_valid pulses for one cycle with char_kind (FCT, EOP, EEP,
// DATA, NULL, TIME) and char_data (data byte or Time code). The error flags
// are sticky until enable drops; after an error no further characters are
// reported. ESC alone is never reported.
//
// Timing: char_valid comes in the cycle after the last bit's bit_valid.
module char_decoder
  import spw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       bit_valid,
  input  logic       bit_in,
  output logic       char_valid,
  output char_kind_e char_kind,
  output logic [7:0] char_data,
  output logic       parity_err,
  output logic       esc_err
);
  logic [9:0] sr;          // bits of the current character, index = order
  logic [3:0] cnt;         // bits received of the current character
  logic       prev_par;    // xor of the previous character's data bits
  logic       esc_pending; // last character was ESC
  logic       halted;
  logic       last_bit;
  logic [9:0] full;        // the character including this bit
  logic [1:0] code;
  logic [7:0] dbyte;

  assign halted = parity_err || esc_err;

  always_comb begin
    full = sr;
    full[cnt] = bit_in;
    code  = full[3:2];
    dbyte = full[9:2];
    last_bit = (cnt >= 4'd1) && ((full[1] && cnt == 4'd3) || (!full[1] && cnt == 4'd9));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      prev_par    <= 1'b0;
      esc_pending <= 1'b0;
      parity_err  <= 1'b0;
      esc_err     <= 1'b0;
      char_valid  <= 1'b0;
      char_kind   <= CH_FCT;
      char_data   <= '0;
    end else begin
      char_valid <= 1'b0;
      if (!enable) begin
        cnt         <= '0;
        prev_par    <= 1'b0;
        esc_pending <= 1'b0;
        parity_err  <= 1'b0;
        esc_err     <= 1'b0;
      end else if (bit_valid && !halted) begin
        sr[cnt] <= bit_in;
        if (cnt == 4'd1 && !(prev_par ^ sr[0] ^ bit_in)) parity_err <= 1'b1;
        if (!last_bit) begin
          cnt <= cnt + 1'b1;
        end else begin
          cnt <= '0;
          if (full[1]) begin
            // control character
            prev_par <= ^code;
            if (esc_pending) begin
              esc_pending <= 1'b0;
              if (code == CODE_FCT) begin
                char_valid <= 1'b1;
                char_kind  <= CH_NULL;
              end else begin
                esc_err <= 1'b1;
              end
            end else if (code == CODE_ESC) begin
              esc_pending <= 1'b1;
            end else begin
              char_valid <= 1'b1;
              char_kind  <= (code == CODE_FCT) ? CH_FCT :
                            (code == CODE_EOP) ? CH_EOP : CH_EEP;
            end
          end else begin
            // data character
            prev_par    <= ^dbyte;
            char_valid  <= 1'b1;
            char_kind   <= esc_pending ? CH_TIME : CH_DATA;
            char_data   <= dbyte;
            esc_pending <= 1'b0;
          end
        end
      end
    end
  end
endmodule
