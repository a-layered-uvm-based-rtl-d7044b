// tb_rx_fifo: random writes and reads at the default depth of 56 against a
// queue model; checks data order, full, free and that writes to a full
// buffer are dropped.
module tb_rx_fifo;
  localparam int DEPTH = 56, W = 9;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic rd_valid, full;
  logic [$clog2(DEPTH+1)-1:0] free;
  int checks = 0, failures = 0, cyc = 0, n_full = 0;
  logic [W-1:0] model[$];

  rx_fifo #(.DEPTH(DEPTH), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(free == DEPTH - model.size(), "free");
      check(full == (model.size() == DEPTH), "full");
      check(rd_valid == (model.size() != 0), "valid");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      wr_en = ($urandom_range(0, 99) < (n < 1500 ? 70 : 30));
      rd_en = ($urandom_range(0, 99) < (n < 1500 ? 30 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      begin
        bit was_full;
        was_full = (model.size() == DEPTH);
        if (rd_en && model.size() != 0) void'(model.pop_front());
        if (wr_en && !was_full) model.push_back(wr_data);
      end
    end
    check(n_full > 0, "buffer filled at least once");
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
