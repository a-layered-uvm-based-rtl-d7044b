// tb_spw_codec: two link ends (A and B) wired back to back at the default
// parameters (100 MHz clock, 10 clocks per bit, 6.4/12.8 us timers, 56-entry
// receive buffer). The test runs one complete operation and makes each link
// mechanism happen at least once:
//  - start-up through ErrorReset, ErrorWait, Ready, Started, Connecting, Run,
//    no sooner than 6.4 + 12.8 us;
//  - packets both ways, data checked byte by byte at the far receive
//    buffer, EOP packets reported by the packet monitor, EEP packets
//    discarded by it;
//  - Time codes A -> B;
//  - flow control: B stops reading, A runs out of credit and stalls, then
//    resumes with nothing lost;
//  - the character rate on a busy link;
//  - a glitch on the line (extra strobe pulse) causing a parity or escape
//    error, and a cut line causing a disconnect; both links recover to Run;
//  - link disable from the user side.
module tb_spw_codec;
  timeunit 1ns;
  timeprecision 100ps;
  import spw_pkg::*;
  localparam int PD = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 100 MHz

  // per-end signals
  logic en_a = 0, en_b = 0;
  logic da, sa, db, sb;            // outputs of A and B
  logic da_in, sa_in, db_in, sb_in;
  logic txv_a = 0, txv_b = 0, txr_a, txr_b;
  nchar_t txc_a = '0, txc_b = '0;
  logic rxv_a, rxv_b, rxr_a = 1, rxr_b = 1;
  nchar_t rxc_a, rxc_b;
  logic tick_a = 0, tick_out_a, tick_out_b;
  logic [7:0] time_a = 0, time_out_a, time_out_b;
  logic pv_a, pv_b, pdis_a, pdis_b, plost_a, plost_b, pack_a, pack_b;
  logic [$clog2(PD+1)-1:0] plen_a, plen_b;
  logic [$clog2(PD)-1:0] paddr_a = 0, paddr_b = 0;
  logic [7:0] pdata_a, pdata_b;
  link_state_e st_a, st_b;
  logic disc_a, disc_b, par_a, par_b, esc_a, esc_b, cre_a, cre_b, fct_a, fct_b;
  logic [5:0] txcr_a, txcr_b, rxe_a, rxe_b;

  // line: B -> A may be cut or glitched by the testbench
  logic cut = 0, glitch = 0;
  assign da_in = cut ? 1'b0 : db;
  assign sa_in = cut ? 1'b0 : (sb ^ glitch);
  assign db_in = da;
  assign sb_in = sa;

  spw_codec u_a (
    .clk, .rst_n, .link_enable(en_a), .d_in(da_in), .s_in(sa_in), .d_out(da), .s_out(sa),
    .tx_valid(txv_a), .tx_char(txc_a), .tx_ready(txr_a),
    .rx_valid(rxv_a), .rx_char(rxc_a), .rx_ready(rxr_a),
    .tick_in(tick_a), .time_in(time_a), .tick_out(tick_out_a), .time_out(time_out_a),
    .pkt_valid(pv_a), .pkt_len(plen_a), .pkt_discard(pdis_a), .pkt_lost(plost_a),
    .pkt_ack(pack_a), .pkt_rd_addr(paddr_a), .pkt_rd_data(pdata_a),
    .state(st_a), .disc_err(disc_a), .parity_err(par_a), .esc_err(esc_a),
    .credit_err(cre_a), .fct_rcvd(fct_a), .tx_credit(txcr_a), .rx_expect(rxe_a)
  );
  spw_codec u_b (
    .clk, .rst_n, .link_enable(en_b), .d_in(db_in), .s_in(sb_in), .d_out(db), .s_out(sb),
    .tx_valid(txv_b), .tx_char(txc_b), .tx_ready(txr_b),
    .rx_valid(rxv_b), .rx_char(rxc_b), .rx_ready(rxr_b),
    .tick_in(1'b0), .time_in(8'h00), .tick_out(tick_out_b), .time_out(time_out_b),
    .pkt_valid(pv_b), .pkt_len(plen_b), .pkt_discard(pdis_b), .pkt_lost(plost_b),
    .pkt_ack(pack_b), .pkt_rd_addr(paddr_b), .pkt_rd_data(pdata_b),
    .state(st_b), .disc_err(disc_b), .parity_err(par_b), .esc_err(esc_b),
    .credit_err(cre_b), .fct_rcvd(fct_b), .tx_credit(txcr_b), .rx_expect(rxe_b)
  );

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // ---------------- mechanism counters ----------------
  int seen_state[6];
  int n_fct = 0, n_tick = 0, n_pkt = 0, n_pdis = 0, n_stall = 0;
  int n_rxerr = 0, n_disc = 0, n_disable = 0, n_rx_b = 0, n_rx_a = 0;
  link_state_e st_a_q = ST_ERROR_RESET;
  always @(posedge clk) if (rst_n) begin
    seen_state[int'(st_a)]++;
    if (fct_a || fct_b) n_fct++;
    if (par_a || esc_a) n_rxerr += (st_a_q == ST_RUN && st_a == ST_ERROR_RESET);
    if (disc_a) n_disc += (st_a_q == ST_RUN && st_a == ST_ERROR_RESET);
    if (pdis_b) n_pdis++;
    if (txv_a && !txr_a && txcr_a == 0 && st_a == ST_RUN) n_stall++;
    check(!cre_a && !cre_b, "no credit error between conforming ends");
    st_a_q <= st_a;
  end

  // ---------------- expected traffic ----------------
  nchar_t exp_ab[$], exp_ba[$];
  logic [7:0] exp_time[$];
  logic [7:0] pkt_model[$][$];   // packets B's monitor should report
  always @(posedge clk) if (rst_n) begin
    if (rxv_b && rxr_b) begin
      n_rx_b++;
      if (exp_ab.size() == 0) check(0, "unexpected N-Char at B");
      else check(rxc_b == exp_ab.pop_front(), "A->B N-Char");
    end
    if (rxv_a && rxr_a) begin
      n_rx_a++;
      if (exp_ba.size() == 0) check(0, "unexpected N-Char at A");
      else check(rxc_a == exp_ba.pop_front(), "B->A N-Char");
    end
    if (tick_out_b) begin
      n_tick++;
      if (exp_time.size() == 0) check(0, "unexpected Time code");
      else check(time_out_b == exp_time.pop_front(), "Time code value");
    end
    if (tick_out_a) check(0, "Time code at A");
  end

  // B's packet monitor: check each reported packet against the model
  initial pack_b = 0;
  always @(negedge clk) begin
    pack_b = 0;
    if (rst_n && pv_b && !pack_b) begin
      n_pkt++;
      if (pkt_model.size() == 0) check(0, "unexpected packet");
      else begin
        logic [7:0] p[$];
        p = pkt_model.pop_front();
        check(plen_b == p.size(), "packet length");
        for (int i = 0; i < p.size(); i++) begin
          paddr_b = i[$clog2(PD)-1:0];
          #0.1 check(pdata_b == p[i], "packet byte");
        end
      end
      pack_b = 1;
    end
  end
  assign pack_a = pv_a;

  // ---------------- drivers ----------------
  task automatic send_a(input nchar_t c);
    txc_a = c; txv_a = 1;
    #1;
    while (!txr_a) begin @(negedge clk); #1; end
    @(negedge clk);
    txv_a = 0;
  endtask
  task automatic send_b(input nchar_t c);
    txc_b = c; txv_b = 1;
    #1;
    while (!txr_b) begin @(negedge clk); #1; end
    @(negedge clk);
    txv_b = 0;
  endtask

  // one packet A->B of n bytes; eep ends it with EEP
  task automatic packet_a(input int n, input bit eep);
    nchar_t c;
    logic [7:0] p[$];
    for (int i = 0; i < n; i++) begin
      c.flag = 0; c.data = 8'($urandom);
      p.push_back(c.data);
      exp_ab.push_back(c);
      send_a(c);
    end
    c.flag = 1; c.data = eep ? 8'h01 : 8'h00;
    exp_ab.push_back(c);
    if (!eep && n <= PD) pkt_model.push_back(p);
    send_a(c);
  endtask
  task automatic packet_b(input int n);
    nchar_t c;
    for (int i = 0; i < n; i++) begin
      c.flag = 0; c.data = 8'($urandom);
      exp_ba.push_back(c);
      send_b(c);
    end
    c.flag = 1; c.data = 0;
    exp_ba.push_back(c);
    send_b(c);
  endtask

  task automatic wait_run(input int limit, output int n);
    n = 0;
    while (!(st_a == ST_RUN && st_b == ST_RUN) && n < limit) begin @(negedge clk); n++; end
    check(st_a == ST_RUN && st_b == ST_RUN, "both ends in Run");
  endtask

  task automatic drain();
    int n = 0;
    while ((exp_ab.size() != 0 || exp_ba.size() != 0) && n < 50000) begin @(negedge clk); n++; end
    repeat (50) @(negedge clk);
    check(exp_ab.size() == 0 && exp_ba.size() == 0, "all N-Chars delivered");
  endtask

  initial begin
    int n, t0, t1, r0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    en_a = 1; en_b = 1;
    // ---- start-up ----
    wait_run(10000, n);
    check(n >= 640 + 1280, $sformatf("start-up takes at least 19.2 us (%0d cycles)", n));
    n = 0;
    while (!(txcr_a == 56 && txcr_b == 56) && n < 1000) begin @(negedge clk); n++; end
    check(txcr_a == 56 && txcr_b == 56, $sformatf("full credit of 56 after start-up (%0d cycles)", n));

    // ---- packets both ways, with Time codes ----
    fork
      begin
        for (int k = 0; k < 12; k++) begin
          packet_a($urandom_range(1, 40), (k % 5 == 4));
          if (k % 4 == 1) begin
            // Time codes go between packets
            @(negedge clk); time_a = 8'(k); tick_a = 1; exp_time.push_back(8'(k));
            @(negedge clk); tick_a = 0;
          end
        end
      end
      for (int k = 0; k < 8; k++) packet_b($urandom_range(1, 30));
    join
    drain();
    check(exp_time.size() == 0, "all Time codes delivered");

    // ---- character rate on a busy link ----
    r0 = n_rx_b;
    t0 = cyc;
    packet_a(40, 0);
    drain();
    t1 = cyc;
    // 40 data characters of 10 bits and one EOP of 4, at 10 clocks per bit,
    // plus the FCTs (4 bits) and the receive latency
    check(t1 - t0 >= 4040 && t1 - t0 <= 4040 + 6 * 40 + 200,
          $sformatf("10 Mbit/s link rate (%0d cycles for 41 N-Chars)", t1 - t0));
    check(n_rx_b - r0 == 41, "41 N-Chars at B");

    // ---- flow control: B stops reading ----
    rxr_b = 0;
    fork
      packet_a(100, 1);
      begin
        repeat (20000) @(negedge clk);
        check(exp_ab.size() > 40, "A stalled by missing credit");
        rxr_b = 1;
      end
    join
    drain();

    // ---- line glitch: parity or escape error at A ----
    repeat (300) @(negedge clk);
    glitch = 1; @(negedge clk); glitch = 0;
    repeat (30) @(negedge clk);
    check(st_a != ST_RUN, "glitch breaks the link");
    wait_run(20000, n);
    check(n_rxerr >= 1, "receive error after glitch");

    // ---- cut line: disconnect at A ----
    cut = 1;
    repeat (200) @(negedge clk);
    check(st_a != ST_RUN, "cut line breaks the link");
    cut = 0;
    wait_run(20000, n);
    check(n_disc >= 1, "disconnect detected");
    packet_a(5, 0);
    packet_b(5);
    drain();

    // ---- link disable on A ----
    en_a = 0;
    repeat (10) @(negedge clk);
    check(st_a == ST_ERROR_RESET, "link disable stops A");
    n_disable++;
    repeat (300) @(negedge clk);
    check(st_b != ST_RUN, "B sees the link go down");
    en_a = 1;
    wait_run(20000, n);
    packet_a(3, 0);
    drain();

    // ---- every mechanism happened ----
    for (int s = 0; s < 6; s++) check(seen_state[s] > 0, $sformatf("state %0d visited", s));
    check(n_fct > 14, "FCTs exchanged");
    check(n_tick == 3, "Time codes");
    check(n_pkt >= 10, $sformatf("packets reported by monitor (%0d)", n_pkt));
    check(n_pdis >= 2, "EEP packets discarded by monitor");
    check(n_stall > 0, "credit stall");
    check(n_rxerr > 0 && n_disc > 0 && n_disable > 0, "error recovery paths");
    $display("mechanisms: fct=%0d tick=%0d pkt=%0d discard=%0d stall=%0d rxerr=%0d disc=%0d disable=%0d",
             n_fct, n_tick, n_pkt, n_pdis, n_stall, n_rxerr, n_disc, n_disable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
