// spw_credit: flow-control credit of one SpaceWire link end.
//
// Two counters, both cleared while clear is high (link not started):
//  - tx_credit: N-Chars this end may still send. Each FCT received adds 8;
//    an FCT that would take it above 56 is a credit error. Each N-Char sent
//    takes one.
//  - rx_expect: N-Chars the other end may still send to us. Each FCT we
//    send adds 8; an N-Char that arrives while it is zero is a credit error.
// The numbers 8 and 56 and both error cases are the document's. fct_ok says
// that the receive buffer has room for 8 more N-Chars beyond those already
// promised, so that another FCT may be sent; this rule is this design's
// reading of how the 56-entry buffer bounds the credit.
//
// credit_err is sticky until clear.
module spw_credit
  import spw_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = MAX_CREDIT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       fct_rcvd,
  input  logic       nchar_sent,
  input  logic       fct_sent,
  input  logic       nchar_rcvd,
  input  logic [$clog2(BUF_DEPTH+1)-1:0] rx_free,
  output logic [5:0] tx_credit,
  output logic [5:0] rx_expect,
  output logic       can_send,
  output logic       fct_ok,
  output logic       credit_err
);
  localparam logic [6:0] PER_FCT = 7'(CREDIT_PER_FCT);
  localparam logic [6:0] MAXC    = 7'(MAX_CREDIT);

  assign can_send = (tx_credit != '0);
  assign fct_ok   = ({1'b0, rx_expect} + PER_FCT <= MAXC) &&
                    (32'(rx_expect) + CREDIT_PER_FCT <= 32'(rx_free));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_credit  <= '0;
      rx_expect  <= '0;
      credit_err <= 1'b0;
    end else if (clear) begin
      tx_credit  <= '0;
      rx_expect  <= '0;
      credit_err <= 1'b0;
    end else begin
      // transmit side
      if (fct_rcvd && ({1'b0, tx_credit} - 7'(nchar_sent) + PER_FCT > MAXC)) begin
        credit_err <= 1'b1;
        tx_credit  <= tx_credit - 6'(nchar_sent);
      end else begin
        tx_credit <= tx_credit + (fct_rcvd ? 6'(CREDIT_PER_FCT) : 6'd0) - 6'(nchar_sent && can_send);
      end
      // receive side
      if (nchar_rcvd && rx_expect == '0 && !fct_sent) begin
        credit_err <= 1'b1;
      end else begin
        rx_expect <= rx_expect + (fct_sent ? 6'(CREDIT_PER_FCT) : 6'd0) - 6'(nchar_rcvd);
      end
    end
  end
endmodule
