// spw_codec: one end of a SpaceWire link, built from its protocol layers.
//
// Receive path (signal -> character -> packet): ds_decoder recovers bits
// from the Data/Strobe pair and detects disconnects; char_decoder turns the
// bits into characters and checks parity and escape rules; N-Chars go into
// the 56-entry receive buffer (rx_fifo) and, in parallel, packet_collector
// assembles them into packets for monitoring. Transmit path: spw_transmitter
// picks NULL/FCT/N-Char/Time code for the link state and ds_encoder drives
// Data/Strobe. link_fsm runs the exchange-layer initialisation and error
// recovery from the receive-side status (gotNULL, gotFCT, gotNChar, gotTime,
// errors) and spw_credit keeps the FCT flow-control credit. This layering
// and the status that flows up and across follow the document's structure;
// the single system clock and the valid/ready user interfaces are this
// design's choices.
//
// User side: tx_valid/tx_char/tx_ready for N-Chars to send, rx_valid/
// rx_char/rx_ready from the receive buffer, tick_in/time_in and
// tick_out/time_out for Time codes, pkt_* for the packet monitor.
// link_enable starts the link (and its drop stops a running link).
module spw_codec
  import spw_pkg::*;
#(
  parameter int unsigned BIT_CYCLES   = 10,    // system clocks per transmit bit
  parameter int unsigned DISC_CYCLES  = 85,    // 850 ns disconnect timeout
  parameter int unsigned RESET_CYCLES = 640,   // 6.4 us in ErrorReset
  parameter int unsigned WAIT_CYCLES  = 1280,  // 12.8 us wait / timeout
  parameter int unsigned RX_DEPTH     = 56,    // receive buffer, N-Chars
  parameter int unsigned PKT_DEPTH    = 64     // packet monitor buffer, bytes
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_enable,
  // link
  input  logic        d_in,
  input  logic        s_in,
  output logic        d_out,
  output logic        s_out,
  // transmit N-Chars
  input  logic        tx_valid,
  input  nchar_t      tx_char,
  output logic        tx_ready,
  // receive N-Chars
  output logic        rx_valid,
  output nchar_t      rx_char,
  input  logic        rx_ready,
  // Time codes
  input  logic        tick_in,
  input  logic [7:0]  time_in,
  output logic        tick_out,
  output logic [7:0]  time_out,
  // packet monitor
  output logic        pkt_valid,
  output logic [$clog2(PKT_DEPTH+1)-1:0] pkt_len,
  output logic        pkt_discard,
  output logic        pkt_lost,
  input  logic        pkt_ack,
  input  logic [$clog2(PKT_DEPTH)-1:0] pkt_rd_addr,
  output logic [7:0]  pkt_rd_data,
  // status
  output link_state_e state,
  output logic        disc_err,
  output logic        parity_err,
  output logic        esc_err,
  output logic        credit_err,
  output logic        fct_rcvd,
  output logic [5:0]  tx_credit,
  output logic [5:0]  rx_expect
);
  logic rx_enable, tx_enable, run;
  logic bit_valid, bit_rx;
  logic char_valid;
  char_kind_e char_kind;
  logic [7:0] char_data;
  logic got_null, got_nchar, got_time;
  logic bit_take, bit_tx;
  logic can_send, fct_ok, fct_sent, nchar_sent;
  logic [$clog2(RX_DEPTH+1)-1:0] rx_free;
  nchar_t rx_wr;

  ds_decoder #(.DISC_CYCLES(DISC_CYCLES)) u_ds_dec (
    .clk, .rst_n, .enable(rx_enable), .d_in, .s_in,
    .bit_valid, .bit_out(bit_rx), .got_bit(), .disc_err
  );

  char_decoder u_char_dec (
    .clk, .rst_n, .enable(rx_enable), .bit_valid, .bit_in(bit_rx),
    .char_valid, .char_kind, .char_data, .parity_err, .esc_err
  );

  assign got_null  = char_valid && char_kind == CH_NULL;
  assign fct_rcvd  = char_valid && char_kind == CH_FCT;
  assign got_time  = char_valid && char_kind == CH_TIME;
  assign got_nchar = char_valid && char_kind inside {CH_DATA, CH_EOP, CH_EEP};

  assign tick_out = got_time && run;
  assign time_out = char_data;

  assign rx_wr.flag = (char_kind != CH_DATA);
  assign rx_wr.data = (char_kind == CH_DATA) ? char_data :
                      (char_kind == CH_EEP)  ? 8'h01 : 8'h00;

  rx_fifo #(.DEPTH(RX_DEPTH), .WIDTH($bits(nchar_t))) u_rx_fifo (
    .clk, .rst_n, .wr_en(got_nchar && run), .wr_data(rx_wr),
    .rd_en(rx_ready), .rd_valid(rx_valid), .rd_data(rx_char),
    .full(), .free(rx_free)
  );

  packet_collector #(.PKT_DEPTH(PKT_DEPTH)) u_pkt (
    .clk, .rst_n, .char_valid(char_valid && run), .char_kind, .char_data,
    .pkt_valid, .pkt_len, .pkt_discard, .pkt_lost, .pkt_ack,
    .rd_addr(pkt_rd_addr), .rd_data(pkt_rd_data)
  );

  spw_credit #(.BUF_DEPTH(RX_DEPTH)) u_credit (
    .clk, .rst_n, .clear(!(state inside {ST_CONNECTING, ST_RUN})),
    .fct_rcvd, .nchar_sent, .fct_sent, .nchar_rcvd(got_nchar && run),
    .rx_free, .tx_credit, .rx_expect, .can_send, .fct_ok, .credit_err
  );

  link_fsm #(.RESET_CYCLES(RESET_CYCLES), .WAIT_CYCLES(WAIT_CYCLES)) u_fsm (
    .clk, .rst_n, .link_enable,
    .rx_err(disc_err || parity_err || esc_err), .credit_err,
    .got_null, .got_fct(fct_rcvd), .got_nchar, .got_time,
    .state, .rx_enable, .tx_enable, .run
  );

  spw_transmitter u_tx (
    .clk, .rst_n, .state, .enable(tx_enable), .bit_take, .bit_out(bit_tx),
    .can_send, .fct_ok, .tx_valid, .tx_char, .tx_ready,
    .tick_in, .time_in, .fct_sent, .nchar_sent, .time_sent()
  );

  ds_encoder #(.BIT_CYCLES(BIT_CYCLES)) u_ds_enc (
    .clk, .rst_n, .enable(tx_enable), .bit_in(bit_tx), .bit_take,
    .d(d_out), .s(s_out)
  );
endmodule
