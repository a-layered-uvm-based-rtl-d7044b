// packet_collector: SpaceWire packet layer monitor.
//
// Gathers the data characters of the received stream into a packet buffer
// of PKT_DEPTH bytes. The document's rules decide what becomes a packet:
// data characters followed by EOP form a valid packet; EEP discards the
// packet in progress; an EOP or EEP with no data before it is discarded;
// a Time code arriving before the closing EOP discards the packet; NULL and
// FCT are not part of the packet layer and are ignored. The buffer size,
// the drop of packets longer than the buffer and the hand-off below are
// this design's choices.
//
// Output: when a valid packet closes, pkt_valid rises with pkt_len and the
// bytes are readable at rd_addr -> rd_data (combinational read). pkt_valid
// holds until pkt_ack; characters arriving meanwhile are not stored, and a
// packet that closes while one is held counts in pkt_lost. pkt_discard
// pulses for each discarded packet.
module packet_collector
  import spw_pkg::*;
#(
  parameter int unsigned PKT_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       char_valid,
  input  char_kind_e char_kind,
  input  logic [7:0] char_data,
  output logic       pkt_valid,
  output logic [$clog2(PKT_DEPTH+1)-1:0] pkt_len,
  output logic       pkt_discard,
  output logic       pkt_lost,
  input  logic       pkt_ack,
  input  logic [$clog2(PKT_DEPTH)-1:0] rd_addr,
  output logic [7:0] rd_data
);
  localparam int unsigned LW = $clog2(PKT_DEPTH + 1);
  localparam int unsigned AW = $clog2(PKT_DEPTH);

  logic [7:0]    buf_q [PKT_DEPTH];
  logic [LW-1:0] wr_len;
  logic          too_long;
  logic          held;     // pkt_valid and a new packet already started
  logic          ignore;   // the packet in progress cannot be stored

  assign rd_data = buf_q[rd_addr];
  assign ignore  = pkt_valid;

  always_ff @(posedge clk) begin
    if (char_valid && char_kind == CH_DATA && !ignore && !too_long && wr_len < LW'(PKT_DEPTH))
      buf_q[wr_len[AW-1:0]] <= char_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_len      <= '0;
      too_long    <= 1'b0;
      held        <= 1'b0;
      pkt_valid   <= 1'b0;
      pkt_len     <= '0;
      pkt_discard <= 1'b0;
      pkt_lost    <= 1'b0;
    end else begin
      pkt_discard <= 1'b0;
      pkt_lost    <= 1'b0;
      if (pkt_ack && pkt_valid) begin
        pkt_valid <= 1'b0;
      end
      if (char_valid) begin
        unique case (char_kind)
          CH_DATA: begin
            held <= held | ignore;
            if (!ignore) begin
              if (wr_len < LW'(PKT_DEPTH)) wr_len <= wr_len + 1'b1;
              else too_long <= 1'b1;
            end
          end
          CH_EOP: begin
            if (held) begin
              pkt_lost <= 1'b1;
            end else if (wr_len != '0 && !too_long && !ignore) begin
              pkt_valid <= 1'b1;
              pkt_len   <= wr_len;
            end else begin
              pkt_discard <= 1'b1;
            end
            wr_len   <= '0;
            too_long <= 1'b0;
            held     <= 1'b0;
          end
          CH_EEP: begin
            pkt_discard <= 1'b1;
            wr_len      <= '0;
            too_long    <= 1'b0;
            held        <= 1'b0;
          end
          CH_TIME: begin
            if (wr_len != '0 || held) begin
              pkt_discard <= 1'b1;
              wr_len      <= '0;
              too_long    <= 1'b0;
              held        <= 1'b0;
            end
          end
          default: ;  // FCT and NULL are link characters
        endcase
      end
    end
  end
endmodule
