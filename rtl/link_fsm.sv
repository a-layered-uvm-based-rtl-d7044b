// link_fsm: SpaceWire exchange layer, link initialisation and error recovery.
//
// States and transitions follow the document's state diagram:
//  ErrorReset  transmitter and receiver held in reset; after 6.4 us -> ErrorWait
//  ErrorWait   receiver enabled; after 12.8 us -> Ready
//  Ready       receiver enabled; when the link is enabled -> Started
//  Started     NULLs sent; gotNULL -> Connecting; 12.8 us timeout -> ErrorReset
//  Connecting  FCTs/NULLs sent; gotFCT -> Run; 12.8 us timeout -> ErrorReset
//  Run         all characters sent; link disabled -> ErrorReset
// Any error returns to ErrorReset: a receive error (disconnect, parity,
// escape) in every state after ErrorReset; an FCT received in ErrorWait,
// Ready or Started; an N-Char or Time code received before Run; a credit
// error in Run. gotNULL is latched from the moment the receiver is enabled
// and cleared in ErrorReset, so a NULL seen in ErrorWait or Ready counts.
// The times are given in system-clock cycles; the defaults assume a 100 MHz
// clock (the clock frequency is this design's choice, the times are the
// document's).
//
// Outputs are registered state decodes: rx_enable from ErrorWait on,
// tx_enable from Started on, run in Run.
module link_fsm
  import spw_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 640,   // 6.4 us
  parameter int unsigned WAIT_CYCLES  = 1280   // 12.8 us
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        link_enable,
  input  logic        rx_err,
  input  logic        credit_err,
  input  logic        got_null,
  input  logic        got_fct,
  input  logic        got_nchar,
  input  logic        got_time,
  output link_state_e state,
  output logic        rx_enable,
  output logic        tx_enable,
  output logic        run
);
  localparam int unsigned TW = $clog2(WAIT_CYCLES + 1);
  logic [TW-1:0] timer;
  logic          null_seen;
  link_state_e   next;
  logic          reset_timer;

  always_comb begin
    next = state;
    unique case (state)
      ST_ERROR_RESET:
        if (timer >= TW'(RESET_CYCLES - 1)) next = ST_ERROR_WAIT;
      ST_ERROR_WAIT:
        if (rx_err || got_fct || got_nchar || got_time) next = ST_ERROR_RESET;
        else if (timer >= TW'(WAIT_CYCLES - 1)) next = ST_READY;
      ST_READY:
        if (rx_err || got_fct || got_nchar || got_time) next = ST_ERROR_RESET;
        else if (link_enable) next = ST_STARTED;
      ST_STARTED:
        if (rx_err || got_fct || got_nchar || got_time) next = ST_ERROR_RESET;
        else if (null_seen || got_null) next = ST_CONNECTING;
        else if (timer >= TW'(WAIT_CYCLES - 1)) next = ST_ERROR_RESET;
      ST_CONNECTING:
        if (rx_err || got_nchar || got_time) next = ST_ERROR_RESET;
        else if (got_fct) next = ST_RUN;
        else if (timer >= TW'(WAIT_CYCLES - 1)) next = ST_ERROR_RESET;
      ST_RUN:
        if (rx_err || credit_err || !link_enable) next = ST_ERROR_RESET;
      default: next = ST_ERROR_RESET;
    endcase
  end

  assign reset_timer = (next != state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_ERROR_RESET;
      timer     <= '0;
      null_seen <= 1'b0;
      rx_enable <= 1'b0;
      tx_enable <= 1'b0;
      run       <= 1'b0;
    end else begin
      state     <= next;
      timer     <= reset_timer ? '0 : (timer == '1 ? timer : timer + 1'b1);
      rx_enable <= (next != ST_ERROR_RESET);
      tx_enable <= (next == ST_STARTED) || (next == ST_CONNECTING) || (next == ST_RUN);
      run       <= (next == ST_RUN);
      if (next == ST_ERROR_RESET) null_seen <= 1'b0;
      else if (got_null && rx_enable) null_seen <= 1'b1;
    end
  end

  // From Ready the link can only wait, start or fall back to ErrorReset.
  a_no_skip: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_READY) |=> (state inside {ST_READY, ST_STARTED, ST_ERROR_RESET}));
endmodule
