// tb_packet_collector: drives character streams and checks the packet rules:
// data + EOP gives a packet with the right length and bytes; EEP, an EOP
// without data and a Time code inside a packet discard it; NULL and FCT are
// ignored; a packet longer than the buffer is dropped; a packet closing
// while another is held is reported lost.
module tb_packet_collector;
  import spw_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic char_valid = 0;
  char_kind_e char_kind = CH_NULL;
  logic [7:0] char_data = 0;
  logic pkt_valid, pkt_discard, pkt_lost, pkt_ack = 0;
  logic [$clog2(D+1)-1:0] pkt_len;
  logic [$clog2(D)-1:0] rd_addr = 0;
  logic [7:0] rd_data;
  int checks = 0, failures = 0, cyc = 0;
  int n_discard = 0, n_lost = 0;
  logic [7:0] model[$];

  packet_collector #(.PKT_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (pkt_discard) n_discard++;
    if (pkt_lost) n_lost++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic ch(input char_kind_e k, input logic [7:0] v = 0);
    @(negedge clk);
    char_valid = 1; char_kind = k; char_data = v;
    @(negedge clk);
    char_valid = 0;
  endtask

  task automatic send_data(input int n);
    logic [7:0] v;
    model.delete();
    for (int i = 0; i < n; i++) begin
      v = 8'($urandom);
      model.push_back(v);
      ch(CH_DATA, v);
      if ($urandom_range(0, 3) == 0) ch(CH_NULL);
      if ($urandom_range(0, 5) == 0) ch(CH_FCT);
    end
  endtask

  task automatic expect_packet();
    @(negedge clk);
    check(pkt_valid, "packet ready");
    check(pkt_len == model.size(), "packet length");
    for (int i = 0; i < model.size(); i++) begin
      rd_addr = i[$clog2(D)-1:0];
      #1 check(rd_data == model[i], "packet byte");
      @(negedge clk);
    end
    pkt_ack = 1; @(negedge clk); pkt_ack = 0;
    check(!pkt_valid, "packet released");
  endtask

  initial begin
    int d0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      send_data($urandom_range(1, D));
      ch(CH_EOP);
      expect_packet();
    end
    d0 = n_discard;
    send_data(5); ch(CH_EEP);
    @(negedge clk); check(!pkt_valid && n_discard == d0 + 1, "EEP discards");
    ch(CH_EOP);
    @(negedge clk); check(!pkt_valid && n_discard == d0 + 2, "EOP without data discarded");
    send_data(4); ch(CH_TIME, 8'h33); ch(CH_EOP);
    @(negedge clk); check(!pkt_valid && n_discard == d0 + 4, "Time code inside packet discards");
    ch(CH_TIME, 8'h34);
    @(negedge clk); check(n_discard == d0 + 4, "Time code between packets is fine");
    send_data(D + 3); ch(CH_EOP);
    @(negedge clk); check(!pkt_valid && n_discard == d0 + 5, "over-long packet dropped");
    send_data(3); ch(CH_EOP);
    expect_packet();
    // a second packet closing while the first is held
    send_data(2); ch(CH_EOP);
    begin
      logic [7:0] keep[$];
      keep = model;
      send_data(3); ch(CH_EOP);
      @(negedge clk); check(n_lost == 1, "second packet lost while held");
      model = keep;
      expect_packet();
    end
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
