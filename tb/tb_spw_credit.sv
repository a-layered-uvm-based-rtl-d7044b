// tb_spw_credit: the two credit-error cases of the link (an FCT that would
// raise the transmit credit above 56, and an N-Char received with no credit
// left after one FCT's 8), then a random run against a counter model that
// checks tx_credit, rx_expect, can_send and fct_ok.
module tb_spw_credit;
  logic clk = 0, rst_n = 0, clear = 1;
  logic fct_rcvd = 0, nchar_sent = 0, fct_sent = 0, nchar_rcvd = 0;
  logic [5:0] rx_free = 56;
  logic [5:0] tx_credit, rx_expect;
  logic can_send, fct_ok, credit_err;
  int checks = 0, failures = 0, cyc = 0;
  int m_tx, m_rx;

  spw_credit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear = 0;
    // transmit credit: 7 FCTs fill it to 56, the 8th is an error
    for (int i = 1; i <= 7; i++) begin
      pulse(fct_rcvd);
      check(tx_credit == 6'(8 * i) && !credit_err, "credit +8 per FCT");
    end
    pulse(fct_rcvd);
    check(credit_err, "credit error above 56");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(!credit_err && tx_credit == 0 && !can_send, "cleared");
    // receive credit: one FCT allows 8 N-Chars, the 9th is an error
    pulse(fct_sent);
    check(rx_expect == 8, "rx credit after FCT");
    for (int i = 0; i < 8; i++) pulse(nchar_rcvd);
    check(!credit_err && rx_expect == 0, "8 N-Chars accepted");
    pulse(nchar_rcvd);
    check(credit_err, "credit error on 9th N-Char");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;

    // random run against a model, never overflowing
    m_tx = 0; m_rx = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rx_free = 6'($urandom_range(0, 56));
      #1;
      check(tx_credit == m_tx && rx_expect == m_rx, "counters");
      check(can_send == (m_tx != 0), "can_send");
      check(fct_ok == (m_rx + 8 <= 56 && m_rx + 8 <= rx_free), "fct_ok");
      fct_rcvd   = (m_tx + 8 <= 56) && ($urandom_range(0, 9) == 0);
      nchar_sent = (m_tx != 0) && ($urandom_range(0, 2) == 0);
      fct_sent   = fct_ok && ($urandom_range(0, 9) == 0);
      nchar_rcvd = (m_rx != 0) && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      m_tx = m_tx + (fct_rcvd ? 8 : 0) - (nchar_sent ? 1 : 0);
      m_rx = m_rx + (fct_sent ? 8 : 0) - (nchar_rcvd ? 1 : 0);
    end
    @(negedge clk);
    fct_rcvd = 0; nchar_sent = 0; fct_sent = 0; nchar_rcvd = 0;
    check(!credit_err, "no error in legal traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
