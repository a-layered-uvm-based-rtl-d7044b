// tb_link_fsm: walks the exchange-layer state machine through link start-up
// and every error path, with short timers (ErrorReset 20 cycles, waits 40),
// and checks the time spent in the timed states and the enables.
module tb_link_fsm;
  import spw_pkg::*;
  localparam int RC = 20, WC = 40;
  logic clk = 0, rst_n = 0, link_enable = 0;
  logic rx_err = 0, credit_err = 0, got_null = 0, got_fct = 0, got_nchar = 0, got_time = 0;
  link_state_e state;
  logic rx_enable, tx_enable, run;
  int checks = 0, failures = 0, cyc = 0;

  link_fsm #(.RESET_CYCLES(RC), .WAIT_CYCLES(WC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d (state %s)", what, cyc, state.name()); end
  endtask

  // wait for a state; return cycles waited
  task automatic wait_state(input link_state_e s, output int n);
    n = 0;
    while (state != s && n < 1000) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reached %s", s.name()));
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  task automatic to_ready();
    int n;
    wait_state(ST_ERROR_RESET, n);
    wait_state(ST_ERROR_WAIT, n);
    wait_state(ST_READY, n);
  endtask

  task automatic enables(input bit rx, input bit tx, input bit r);
    check(rx_enable == rx && tx_enable == tx && run == r, "enables");
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_ERROR_RESET, "starts in ErrorReset");
    enables(0, 0, 0);
    wait_state(ST_ERROR_WAIT, n);
    check(n >= RC - 2 && n <= RC + 1, $sformatf("ErrorReset lasts 6.4 us (%0d)", n));
    enables(1, 0, 0);
    wait_state(ST_READY, n);
    check(n >= WC - 1 && n <= WC + 1, $sformatf("ErrorWait lasts 12.8 us (%0d)", n));
    repeat (50) @(negedge clk);
    check(state == ST_READY, "Ready waits for link enable");
    enables(1, 0, 0);
    link_enable = 1;
    wait_state(ST_STARTED, n);
    enables(1, 1, 0);
    pulse(got_null);
    @(negedge clk);
    check(state == ST_CONNECTING, "gotNULL -> Connecting");
    pulse(got_fct);
    @(negedge clk);
    check(state == ST_RUN, "gotFCT -> Run");
    enables(1, 1, 1);
    pulse(got_nchar); pulse(got_time); pulse(got_fct);
    check(state == ST_RUN, "Run stays on traffic");
    pulse(credit_err);
    check(state == ST_ERROR_RESET, "credit error -> ErrorReset");

    // Started timeout
    to_ready();
    wait_state(ST_STARTED, n);
    wait_state(ST_ERROR_RESET, n);
    check(n >= WC - 1 && n <= WC + 1, $sformatf("Started times out after 12.8 us (%0d)", n));

    // FCT in ErrorWait is an error
    wait_state(ST_ERROR_WAIT, n);
    repeat (5) @(negedge clk);
    pulse(got_fct);
    check(state == ST_ERROR_RESET, "FCT in ErrorWait -> ErrorReset");

    // NULL seen in ErrorWait is remembered
    wait_state(ST_ERROR_WAIT, n);
    pulse(got_null);
    wait_state(ST_READY, n);
    wait_state(ST_CONNECTING, n);
    check(n <= 3, "latched gotNULL skips Started quickly");
    // Connecting timeout
    wait_state(ST_ERROR_RESET, n);
    check(n >= WC - 4 && n <= WC + 1, $sformatf("Connecting times out after 12.8 us (%0d)", n));

    // N-Char in Connecting
    wait_state(ST_STARTED, n);
    pulse(got_null);
    @(negedge clk);
    check(state == ST_CONNECTING, "Connecting again");
    pulse(got_nchar);
    check(state == ST_ERROR_RESET, "N-Char in Connecting -> ErrorReset");

    // receive error in Ready, Time code in Started
    link_enable = 0;
    to_ready();
    pulse(rx_err);
    check(state == ST_ERROR_RESET, "rx error in Ready -> ErrorReset");
    link_enable = 1;
    wait_state(ST_STARTED, n);
    pulse(got_time);
    check(state == ST_ERROR_RESET, "Time code in Started -> ErrorReset");

    // link disabled in Run, rx error in Run
    wait_state(ST_STARTED, n);
    pulse(got_null); pulse(got_fct);
    check(state == ST_RUN, "Run again");
    link_enable = 0;
    @(negedge clk); @(negedge clk);
    check(state == ST_ERROR_RESET, "link disabled -> ErrorReset");
    link_enable = 1;
    wait_state(ST_STARTED, n);
    pulse(got_null); pulse(got_fct);
    pulse(rx_err);
    check(state == ST_ERROR_RESET, "rx error in Run -> ErrorReset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
