// tb_spw_workloads: one link end at its default parameters against a
// scripted peer whose characters are encoded here (own parity and DS
// encoding, 10 clocks per bit). It replays the test cases the design was
// evaluated with:
//  1. Basic start-up: the peer sends only NULLs and one FCT; the link end
//     must pass through every start-up state into Run.
//  2. Packet traffic: N-Chars, NULLs, EEP, EOP and Time codes; checks the
//     receive buffer contents, the packet monitor (one packet kept, one
//     discarded by EEP, one by a Time code) and the Time code output.
//  3. Too many FCTs: the peer keeps sending FCTs without taking any data;
//     the credit error must come with the FCT that lifts the credit above 56
//     and the link must fall back to ErrorReset.
//  4. Too many N-Chars: with the receive buffer not read, the peer sends one
//     N-Char more than it was given credit for; credit error and ErrorReset.
//  5. Receive errors: a data character with a wrong parity bit, then ESC
//     followed by EOP; each must reset the link.
// A tally of received characters and codes (FCT, EOP, EEP, data, NULL,
// Time code) and errors (receive, credit) fails the test for any category
// that never occurred.
module tb_spw_workloads;
  timeunit 1ns;
  timeprecision 100ps;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, d_in = 0, s_in = 0, d_out, s_out;
  logic tx_ready, rx_valid, rx_ready = 1, tick_out;
  nchar_t rx_char;
  logic [7:0] time_out;
  logic pkt_valid, pkt_discard, pkt_lost, pkt_ack = 0;
  logic [6:0] pkt_len;
  logic [5:0] pkt_rd_addr = 0;
  logic [7:0] pkt_rd_data;
  link_state_e state;
  logic disc_err, parity_err, esc_err, credit_err, fct_rcvd;
  logic [5:0] tx_credit, rx_expect;

  spw_codec dut (
    .clk, .rst_n, .link_enable(en), .d_in, .s_in, .d_out, .s_out,
    .tx_valid(1'b0), .tx_char('0), .tx_ready,
    .rx_valid, .rx_char, .rx_ready,
    .tick_in(1'b0), .time_in(8'h00), .tick_out, .time_out,
    .pkt_valid, .pkt_len, .pkt_discard, .pkt_lost, .pkt_ack, .pkt_rd_addr, .pkt_rd_data,
    .state, .disc_err, .parity_err, .esc_err, .credit_err, .fct_rcvd, .tx_credit, .rx_expect
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d (state %s)", what, cyc, state.name()); end
  endtask

  // ---------------- scripted peer ----------------
  bit q[$];          // bits waiting to be sent
  bit par = 0;       // xor of the data bits of the last character queued
  bit peer_on = 0;
  task automatic q_ctrl(input bit c0, input bit c1);
    q.push_back(~(par ^ 1'b1)); q.push_back(1'b1); q.push_back(c0); q.push_back(c1);
    par = c0 ^ c1;
  endtask
  task automatic q_data(input logic [7:0] v);
    q.push_back(~par); q.push_back(1'b0);
    for (int i = 0; i < 8; i++) q.push_back(v[i]);
    par = ^v;
  endtask
  task automatic q_data_badpar(input logic [7:0] v);
    q.push_back(par); q.push_back(1'b0);
    for (int i = 0; i < 8; i++) q.push_back(v[i]);
    par = ^v;
  endtask
  task automatic q_null(); q_ctrl(1, 1); q_ctrl(0, 0); endtask
  task automatic q_fct();  q_ctrl(0, 0); endtask
  task automatic q_eop();  q_ctrl(0, 1); endtask
  task automatic q_eep();  q_ctrl(1, 0); endtask
  task automatic q_time(input logic [7:0] v); q_ctrl(1, 1); q_data(v); endtask
  task automatic wait_sent();
    while (q.size() != 0) @(negedge clk);
  endtask

  // one bit every 10 clocks; NULLs fill idle time
  int ph = 0;
  always @(posedge clk) begin
    if (!peer_on) begin
      ph = 0;
    end else begin
      ph = (ph + 1) % 10;
      if (ph == 0) begin
        bit b;
        if (q.size() == 0) q_null();
        b = q.pop_front();
        if (b == d_in) s_in <= ~s_in; else d_in <= b;
      end
    end
  end
  task automatic peer_restart();
    peer_on = 0; q.delete(); par = 0;
    @(negedge clk); d_in = 0; s_in = 0;
  endtask

  // ---------------- observers ----------------
  int seen[6];
  nchar_t rx_seen[$];
  logic [7:0] times[$];
  int n_disc_pkt = 0;
  int bin_char[6];                 // indexed by char_kind_e
  int bin_rxerr = 0, bin_crediterr = 0;
  logic rxerr_q = 0, crediterr_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.char_valid) bin_char[int'(dut.char_kind)]++;
    if ((parity_err || esc_err || disc_err) && !rxerr_q) bin_rxerr++;
    if (credit_err && !crediterr_q) bin_crediterr++;
    rxerr_q <= parity_err || esc_err || disc_err;
    crediterr_q <= credit_err;
    seen[int'(state)]++;
    if (rx_valid && rx_ready) rx_seen.push_back(rx_char);
    if (tick_out) times.push_back(time_out);
    if (pkt_discard) n_disc_pkt++;
  end

  task automatic wait_state(input link_state_e s, input int limit);
    int n = 0;
    while (state != s && n < limit) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reached %s", s.name()));
  endtask

  // bring the link to Run: NULLs until Connecting, then one FCT
  task automatic start_link();
    peer_restart();
    wait_state(ST_READY, 5000);
    peer_on = 1;
    wait_state(ST_CONNECTING, 5000);
    q_fct();
    wait_state(ST_RUN, 2000);
  endtask

  function automatic nchar_t dc(input logic [7:0] v); return '{flag: 1'b0, data: v}; endfunction

  initial begin
    int n, k;
    repeat (5) @(negedge clk);
    rst_n = 1; en = 1;

    // ---- 1. basic start-up ----
    start_link();
    @(negedge clk);
    for (int s = 0; s < 6; s++) check(seen[s] > 0, $sformatf("start-up state %0d visited", s));
    check(tx_credit == 8, "credit of one FCT");
    n = 0;
    while (rx_expect != 56 && n < 2000) begin @(negedge clk); n++; end
    check(rx_expect == 56, "link end grants 56 N-Chars");

    // ---- 2. packet traffic ----
    for (int i = 0; i < 5; i++) q_data(8'(8'h10 + i));
    q_null(); q_eop();
    for (int i = 0; i < 3; i++) q_data(8'(8'h20 + i));
    q_eep();
    q_time(8'h2A);
    q_data(8'h30); q_data(8'h31); q_time(8'h2B); q_eop();
    wait_sent();
    repeat (100) @(negedge clk);
    check(state == ST_RUN, "still in Run after traffic");
    check(rx_seen.size() == 13, $sformatf("13 N-Chars buffered (%0d)", rx_seen.size()));
    for (int i = 0; i < 5; i++) check(rx_seen.size() > i && rx_seen[i] == dc(8'(8'h10 + i)), "packet data");
    check(rx_seen.size() > 5 && rx_seen[5] == '{flag: 1'b1, data: 8'h00}, "EOP buffered");
    check(rx_seen.size() > 9 && rx_seen[9] == '{flag: 1'b1, data: 8'h01}, "EEP buffered");
    check(times.size() == 2 && times[0] == 8'h2A && times[1] == 8'h2B, "Time codes delivered");
    check(pkt_valid && pkt_len == 5, "monitor holds the 5-byte packet");
    for (int i = 0; i < 5; i++) begin
      pkt_rd_addr = 6'(i);
      #0.1 check(pkt_rd_data == 8'(8'h10 + i), "monitor packet byte");
    end
    @(negedge clk); pkt_ack = 1; @(negedge clk); pkt_ack = 0;
    // the EEP packet, the packet broken by a Time code, and the EOP left
    // without data after it
    check(n_disc_pkt == 3, $sformatf("three discards by the monitor (%0d)", n_disc_pkt));

    // ---- 3. too many FCTs ----
    k = 0;
    while (state == ST_RUN && k < 12) begin
      q_fct(); wait_sent(); repeat (20) @(negedge clk);
      k++;
    end
    // one FCT at start-up plus k here; 8 FCTs exceed 56
    check(k + 1 == 8, $sformatf("credit error at FCT number %0d", k + 1));
    check(state == ST_ERROR_RESET || state == ST_ERROR_WAIT, "credit error resets the link");

    // ---- 4. too many N-Chars ----
    rx_ready = 0;
    @(negedge clk);
    while (rx_valid) begin rx_ready = 1; @(negedge clk); end
    rx_ready = 0;
    start_link();
    n = 0;
    while (rx_expect != 56 && n < 2000) begin @(negedge clk); n++; end
    check(rx_expect == 56, "56 N-Chars granted again");
    k = 0;
    while (state == ST_RUN && k < 70) begin
      q_data(8'(k)); wait_sent(); repeat (20) @(negedge clk);
      k++;
    end
    check(k == 57, $sformatf("credit error at N-Char number %0d", k));
    check(state != ST_RUN, "link reset after receive credit error");

    // ---- 5. receive errors ----
    rx_ready = 1;
    start_link();
    q_data(8'h55); q_eop();
    q_data_badpar(8'h66);
    wait_sent();
    repeat (40) @(negedge clk);
    check(state != ST_RUN, "parity error resets the link");
    check(seen_parity, "parity error flagged");
    start_link();
    q_ctrl(1, 1); q_eop();
    wait_sent();
    repeat (40) @(negedge clk);
    check(state != ST_RUN, "escape error resets the link");
    check(seen_esc, "escape error flagged");

    // ---- tally ----
    $display("tally: FCT=%0d EOP=%0d EEP=%0d DATA=%0d NULL=%0d TIME=%0d rxError=%0d creditError=%0d",
             bin_char[0], bin_char[1], bin_char[2], bin_char[3], bin_char[4], bin_char[5],
             bin_rxerr, bin_crediterr);
    for (int b = 0; b < 6; b++) check(bin_char[b] > 0, $sformatf("character kind %0d received", b));
    check(bin_rxerr >= 2, "receive errors occurred");
    check(bin_crediterr >= 2, "credit errors occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen_parity = 0, seen_esc = 0;
  always @(posedge clk) begin
    if (parity_err) seen_parity <= 1;
    if (esc_err) seen_esc <= 1;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
