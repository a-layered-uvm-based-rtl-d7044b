// tb_ds_decoder: drives a DS-encoded random bit stream (encoded here, not by
// the RTL encoder) into the decoder and compares every recovered bit; then
// stops the line and checks that the disconnect flag rises after the
// timeout (850 ns = 85 clocks at 100 MHz) and not before.
module tb_ds_decoder;
  logic clk = 0, rst_n = 0, enable = 0, d_in = 0, s_in = 0;
  logic bit_valid, bit_out, got_bit, disc_err;
  int checks = 0, failures = 0, cyc = 0;
  bit sent[$];
  int stop_cyc, err_cyc;

  ds_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n && bit_valid) begin
    if (sent.size() == 0) check(0, "unexpected bit");
    else check(bit_out == sent.pop_front(), "bit value");
  end

  initial begin
    bit b;
    repeat (3) @(posedge clk);
    rst_n = 1; enable = 1;
    repeat (5) @(posedge clk);
    check(!got_bit && !disc_err, "quiet before first bit");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      b = 1'($urandom_range(0, 1));
      if (b == d_in) s_in = ~s_in; else d_in = b;
      sent.push_back(b);
      stop_cyc = cyc;
      repeat ($urandom_range(3, 12)) @(negedge clk);
      check(!disc_err, "no disconnect while active");
    end
    repeat (8) @(negedge clk);
    check(sent.size() == 0, "all bits received");
    while (!disc_err && cyc < stop_cyc + 200) @(negedge clk);
    err_cyc = cyc;
    check(disc_err, "disconnect detected");
    check(err_cyc - stop_cyc >= 85 && err_cyc - stop_cyc <= 92, $sformatf("disconnect after 850 ns (%0d)", err_cyc - stop_cyc));
    @(negedge clk); enable = 0;
    @(negedge clk); @(negedge clk);
    check(!disc_err && !got_bit, "cleared by enable");
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
