// spw_pkg: types and constants shared by the SpaceWire link blocks.
//
// Character codes follow the SpaceWire character layer: every character
// starts with a parity bit P and a control flag, sent in that order. A
// control character carries two more bits (FCT 00, EOP 01, EEP 10, ESC 11,
// first bit sent first), a data character eight data bits, least significant
// first. NULL is ESC followed by FCT; a Time code is ESC followed by a data
// character. Parity is odd over the data/control bits of the previous
// character plus the parity bit and control flag of the current one.
//
// The link states are those of the exchange-layer initialisation diagram.
// The credit constants (8 N-Chars per FCT, at most 56 outstanding) follow
// the receive-buffer size used for the credit-error cases. The code values
// of the enums are this design's own choice.
package spw_pkg;

  // Control codes: the two bits after the control flag, index 0 sent first.
  localparam logic [1:0] CODE_FCT = 2'b00;
  localparam logic [1:0] CODE_EOP = 2'b10;  // bits sent 0 then 1
  localparam logic [1:0] CODE_EEP = 2'b01;  // bits sent 1 then 0
  localparam logic [1:0] CODE_ESC = 2'b11;

  // Kind of a decoded character or code.
  typedef enum logic [2:0] {
    CH_FCT  = 3'd0,
    CH_EOP  = 3'd1,
    CH_EEP  = 3'd2,
    CH_DATA = 3'd3,
    CH_NULL = 3'd4,
    CH_TIME = 3'd5
  } char_kind_e;

  // Exchange-layer link states.
  typedef enum logic [2:0] {
    ST_ERROR_RESET = 3'd0,
    ST_ERROR_WAIT  = 3'd1,
    ST_READY       = 3'd2,
    ST_STARTED     = 3'd3,
    ST_CONNECTING  = 3'd4,
    ST_RUN         = 3'd5
  } link_state_e;

  // N-Char on the user side: flag=1 marks an end-of-packet marker, with
  // data[0] = 0 for EOP and 1 for EEP; flag=0 marks a data byte.
  typedef struct packed {
    logic       flag;
    logic [7:0] data;
  } nchar_t;

  localparam int unsigned CREDIT_PER_FCT = 8;
  localparam int unsigned MAX_CREDIT     = 56;

endpackage
