// tb_ds_encoder: checks the Data-Strobe encoding rule on random bits.
// Each taken bit must appear on d, exactly one of d and s must change per
// bit period, and bits must be taken every BIT_CYCLES clocks.
module tb_ds_encoder;
  localparam int BC = 4;
  logic clk = 0, rst_n = 0, enable = 0, bit_in = 0;
  logic bit_take, d, s;
  int checks = 0, failures = 0;
  int last_take = -1, cyc = 0;
  logic pd, ps, expect_bit;
  logic pending = 0;

  ds_encoder #(.BIT_CYCLES(BC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(d == 0 && s == 0, "idle low");
    enable = 1;
    bit_in = $urandom_range(0, 1);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      while (!bit_take) @(negedge clk);
      if (last_take >= 0) check(cyc - last_take == BC, "bit period");
      last_take = cyc;
      expect_bit = bit_in; pd = d; ps = s;
      @(negedge clk);
      check(d == expect_bit, "d carries bit");
      check((d != pd) ^ (s != ps), "exactly one line toggles");
      bit_in = $urandom_range(0, 1);
    end
    enable = 0;
    @(negedge clk); @(negedge clk);
    check(d == 0 && s == 0, "disabled low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
