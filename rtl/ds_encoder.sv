// ds_encoder: Data-Strobe line encoder (signal layer, transmit side).
//
// Every BIT_CYCLES clock cycles, while enabled, the encoder takes the bit on
// bit_in (bit_take pulses in that cycle) and puts it on d. If the new bit
// equals the bit already on d, s toggles instead, so exactly one of d and s
// changes per bit period and d xor s is a clock at half the bit rate. That
// rule is the document's; the bit period as a count of system clocks and the
// take-pulse handshake are this design's choice. While disabled both lines
// are held low and the bit timer is cleared.
//
// Timing: the first bit is taken on the first cycle of enable, then one
// every BIT_CYCLES cycles; d/s change in the cycle after bit_take.
module ds_encoder #(
  parameter int unsigned BIT_CYCLES = 10  // system clocks per bit
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic bit_in,
  output logic bit_take,
  output logic d,
  output logic s
);
  localparam int unsigned CW = (BIT_CYCLES > 1) ? $clog2(BIT_CYCLES) : 1;
  logic [CW-1:0] cnt;

  assign bit_take = enable && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      d   <= 1'b0;
      s   <= 1'b0;
    end else if (!enable) begin
      cnt <= '0;
      d   <= 1'b0;
      s   <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(BIT_CYCLES - 1)) ? '0 : cnt + 1'b1;
      if (bit_take) begin
        if (bit_in == d) s <= ~s;
        d <= bit_in;
      end
    end
  end
endmodule
