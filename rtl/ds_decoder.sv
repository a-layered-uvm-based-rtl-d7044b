// ds_decoder: Data-Strobe line decoder (signal layer, receive side).
//
// The receive clock of a DS link is d xor s; a bit is carried on both of its
// edges. This block recovers it by oversampling with the system clock: d and
// s pass through two-flop synchronisers, and any change of the synchronised
// pair marks one received bit, whose value is the new d. This sampling
// scheme is this design's choice; it needs the system clock well above the
// link edge rate (at least three clocks per bit).
//
// Disconnect: once the first bit has been seen (got_bit), a gap of more than
// DISC_CYCLES clocks without any transition raises disc_err, which stays set
// until enable drops. The 850 ns timeout is the document's; at the assumed
// 100 MHz system clock it is 85 cycles. While enable is low the decoder is
// held in reset.
//
// Timing: bit_valid pulses for one cycle, three clocks after the line edge.
module ds_decoder #(
  parameter int unsigned DISC_CYCLES = 85  // 850 ns at 100 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic d_in,
  input  logic s_in,
  output logic bit_valid,
  output logic bit_out,
  output logic got_bit,
  output logic disc_err
);
  localparam int unsigned TW = $clog2(DISC_CYCLES + 2);

  logic [1:0] d_sync, s_sync;
  logic       d_q, s_q;
  logic [TW-1:0] idle_cnt;
  logic       edge_seen;

  assign edge_seen = (d_sync[1] != d_q) || (s_sync[1] != s_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sync <= '0;
      s_sync <= '0;
    end else begin
      d_sync <= {d_sync[0], d_in};
      s_sync <= {s_sync[0], s_in};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q       <= 1'b0;
      s_q       <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      got_bit   <= 1'b0;
      disc_err  <= 1'b0;
      idle_cnt  <= '0;
    end else begin
      d_q       <= d_sync[1];
      s_q       <= s_sync[1];
      bit_valid <= 1'b0;
      if (!enable) begin
        got_bit  <= 1'b0;
        disc_err <= 1'b0;
        idle_cnt <= '0;
      end else begin
        if (edge_seen) begin
          bit_valid <= ~disc_err;
          bit_out   <= d_sync[1];
          got_bit   <= 1'b1;
          idle_cnt  <= '0;
        end else if (got_bit && !disc_err) begin
          if (idle_cnt >= TW'(DISC_CYCLES)) disc_err <= 1'b1;
          else idle_cnt <= idle_cnt + 1'b1;
        end
      end
    end
  end
endmodule
