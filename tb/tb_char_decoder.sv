// tb_char_decoder: feeds the character decoder with bit streams built here
// from the character layer rules (parity bit, control flag, two code bits
// or eight data bits LSB first, odd parity over the previous character's
// data bits plus P and flag). Checks every reported character, then that a
// bad parity bit raises parity_err and that ESC followed by EOP raises
// esc_err, both stopping further output.
module tb_char_decoder;
  import spw_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, bit_valid = 0, bit_in = 0;
  logic char_valid, parity_err, esc_err;
  char_kind_e char_kind;
  logic [7:0] char_data;
  int checks = 0, failures = 0, cyc = 0;

  bit         bits[$];
  char_kind_e exp_kind[$];
  logic [7:0] exp_data[$];
  bit         par;   // xor of last character's data bits
  int got_counts[6];

  char_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // raw characters
  task automatic put_ctrl(input bit c0, input bit c1, input bit bad = 0);
    bits.push_back(!(par ^ 1'b1) ^ bad);
    bits.push_back(1'b1); bits.push_back(c0); bits.push_back(c1);
    par = c0 ^ c1;
  endtask
  task automatic put_data(input logic [7:0] v);
    bits.push_back(!(par ^ 1'b0));
    bits.push_back(1'b0);
    for (int i = 0; i < 8; i++) bits.push_back(v[i]);
    par = ^v;
  endtask
  // characters with their expected report
  task automatic c_fct();  put_ctrl(0,0); exp_kind.push_back(CH_FCT); exp_data.push_back(0); endtask
  task automatic c_eop();  put_ctrl(0,1); exp_kind.push_back(CH_EOP); exp_data.push_back(0); endtask
  task automatic c_eep();  put_ctrl(1,0); exp_kind.push_back(CH_EEP); exp_data.push_back(0); endtask
  task automatic c_null(); put_ctrl(1,1); put_ctrl(0,0); exp_kind.push_back(CH_NULL); exp_data.push_back(0); endtask
  task automatic c_data(input logic [7:0] v); put_data(v); exp_kind.push_back(CH_DATA); exp_data.push_back(v); endtask
  task automatic c_time(input logic [7:0] v); put_ctrl(1,1); put_data(v); exp_kind.push_back(CH_TIME); exp_data.push_back(v); endtask

  task automatic send_bits();
    while (bits.size() > 0) begin
      @(negedge clk);
      bit_valid = 1; bit_in = bits.pop_front();
      @(negedge clk);
      bit_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && char_valid) begin
    got_counts[int'(char_kind)]++;
    if (exp_kind.size() == 0) check(0, "unexpected character");
    else begin
      check(char_kind == exp_kind.pop_front(), $sformatf("kind %s", char_kind.name()));
      if (char_kind inside {CH_DATA, CH_TIME}) check(char_data == exp_data.pop_front(), "data");
      else void'(exp_data.pop_front());
    end
  end

  initial begin
    int r;
    repeat (3) @(posedge clk);
    rst_n = 1; enable = 1; par = 0;
    c_null(); c_null(); c_fct(); c_fct();
    for (int n = 0; n < 300; n++) begin
      r = $urandom_range(0, 9);
      case (r)
        0: c_fct();
        1: c_eop();
        2: c_eep();
        3: c_null();
        4: c_time(8'($urandom));
        default: c_data(8'($urandom));
      endcase
    end
    send_bits();
    check(exp_kind.size() == 0, "all characters reported");
    check(!parity_err && !esc_err, "no error on good stream");
    for (int k = 0; k < 6; k++) check(got_counts[k] > 0, "every kind seen");

    // parity error: a data character with the wrong parity bit
    c_data(8'h5a);
    put_ctrl(0, 0, 1);  // FCT with inverted parity, never reported
    c_data(8'h11);      // after the error: never reported
    send_bits();
    check(parity_err, "parity error raised");
    check(exp_kind.size() == 1, "nothing reported after parity error");
    exp_kind.delete(); exp_data.delete();

    // escape error: ESC followed by EOP
    @(negedge clk); enable = 0; @(negedge clk); enable = 1; par = 0;
    check(!parity_err, "parity error cleared");
    c_null();
    put_ctrl(1, 1); put_ctrl(0, 1);
    send_bits();
    check(esc_err, "escape error raised");
    check(exp_kind.size() == 0, "NULL before escape error reported");

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
