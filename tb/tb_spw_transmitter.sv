// tb_spw_transmitter: takes bits from the transmitter at a fixed bit period,
// decodes them here (its own parity check and character parser) and checks
// the characters sent: only NULLs in Started, FCTs in Connecting while
// fct_ok, and in Run the user's N-Chars in order, Time codes after tick_in,
// and NULLs when there is no credit or nothing to send.
module tb_spw_transmitter;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, bit_take = 0;
  link_state_e state = ST_ERROR_RESET;
  logic bit_out, can_send = 0, fct_ok = 0, tx_valid = 0, tx_ready;
  nchar_t tx_char = '0;
  logic tick_in = 0;
  logic [7:0] time_in = 0;
  logic fct_sent, nchar_sent, time_sent;
  int checks = 0, failures = 0, cyc = 0;

  spw_transmitter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // bit clock: a take every 4 cycles while enabled
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 4;
    bit_take <= enable && (phase == 3);
  end

  // receive-side parser
  bit rx_bits[$];
  int kind_q[$];       // 0 FCT 1 EOP 2 EEP 3 DATA 4 NULL 5 TIME
  logic [7:0] val_q[$];
  bit par_prev = 0, esc = 0;
  int n_fct_sent = 0, n_nchar_sent = 0;
  always @(posedge clk) if (rst_n) begin
    if (fct_sent) n_fct_sent++;
    if (nchar_sent) n_nchar_sent++;
    if (bit_take) begin
      rx_bits.push_back(bit_out);
      if (rx_bits.size() >= 2) begin
        int need;
        need = rx_bits[1] ? 4 : 10;
        if (rx_bits.size() == need) begin
          check((par_prev ^ rx_bits[0] ^ rx_bits[1]) == 1'b1, "odd parity");
          if (rx_bits[1]) begin
            int code;
            code = {rx_bits[3], rx_bits[2]};  // first-sent bit in bit 0
            par_prev = rx_bits[2] ^ rx_bits[3];
            if (esc) begin
              check(code == 0, "ESC followed by FCT");
              kind_q.push_back(4); val_q.push_back(0); esc = 0;
            end else if (code == 3) esc = 1;
            else begin
              kind_q.push_back(code == 0 ? 0 : code == 2 ? 1 : 2); val_q.push_back(0);
            end
          end else begin
            logic [7:0] v;
            for (int i = 0; i < 8; i++) v[i] = rx_bits[2 + i];
            par_prev = ^v;
            kind_q.push_back(esc ? 5 : 3); val_q.push_back(v); esc = 0;
          end
          rx_bits.delete();
        end
      end
    end
  end

  nchar_t exp_q[$];
  logic [7:0] exp_t[$];

  initial begin
    int k; logic [7:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    state = ST_STARTED; enable = 1;
    repeat (400) @(negedge clk);
    check(kind_q.size() >= 10, "NULLs sent in Started");
    while (kind_q.size() > 0) begin
      check(kind_q.pop_front() == 4, "only NULL in Started"); void'(val_q.pop_front());
    end

    // Connecting: FCTs while allowed
    state = ST_CONNECTING; fct_ok = 1;
    repeat (400) @(negedge clk);
    fct_ok = 0;
    repeat (60) @(negedge clk);
    k = 0;
    while (kind_q.size() > 0) begin
      int t;
      t = kind_q.pop_front(); void'(val_q.pop_front());
      if (t == 0) k++; else check(t == 4, "FCT or NULL in Connecting");
    end
    check(k > 5 && k == n_fct_sent, "FCTs sent and counted");

    // Run: user N-Chars and Time codes
    state = ST_RUN; can_send = 1;
    for (int n = 0; n < 60; n++) begin
      tx_char.flag = ($urandom_range(0, 5) == 0);
      tx_char.data = tx_char.flag ? 8'($urandom_range(0, 1)) : 8'($urandom);
      if (n % 10 == 5) begin
        tick_in = 1; time_in = 8'(n);
        exp_t.push_back(8'(n));
        @(negedge clk);
        tick_in = 0;
      end
      tx_valid = 1;
      #1;
      while (!tx_ready) begin @(negedge clk); #1; end
      exp_q.push_back(tx_char);
      @(negedge clk);
      tx_valid = 0;
      repeat ($urandom_range(0, 50)) @(negedge clk);
    end
    repeat (80) @(negedge clk);
    check(n_nchar_sent == 60, "N-Chars counted");
    k = 0;
    while (kind_q.size() > 0) begin
      int t;
      t = kind_q.pop_front(); v = val_q.pop_front();
      if (t == 4) continue;
      if (t == 5) begin
        check(exp_t.size() > 0 && v == exp_t.pop_front(), "Time code value");
        k++;
      end else begin
        nchar_t e;
        e = exp_q.pop_front();
        if (t == 3) check(!e.flag && e.data == v, $sformatf("data character got %h exp %b %h", v, e.flag, e.data));
        else check(e.flag && e.data[0] == (t == 2) && t != 0, "EOP/EEP");
      end
    end
    check(exp_q.size() == 0 && k == 6, "all N-Chars and Time codes sent");

    // no credit: only NULLs even with data offered
    can_send = 0; tx_valid = 1; tx_char = '0;
    repeat (300) @(negedge clk);
    check(!tx_ready && kind_q.size() > 3, "stalled without credit");
    while (kind_q.size() > 0) begin
      check(kind_q.pop_front() == 4, "NULL without credit"); void'(val_q.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
