// rx_fifo: receive buffer for N-Chars (data bytes and end-of-packet markers).
//
// A synchronous first-in first-out buffer of DEPTH entries of WIDTH bits.
// The default of 56 entries is the receive-buffer capacity that bounds the
// link credit; its organisation (circular array with read and write
// pointers, show-ahead read port) is this design's choice. free reports the
// number of empty entries, which the credit logic uses to decide whether
// another FCT may be sent.
//
// Interface: write with wr_en (ignored when full); the head entry is on
// rd_data while rd_valid is high and is removed by rd_en. A write and a read
// may happen in the same cycle.
module rx_fifo #(
  parameter int unsigned DEPTH = 56,
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [CW-1:0]    count;
  logic             do_wr, do_rd;

  assign full     = (count == CW'(DEPTH));
  assign rd_valid = (count != '0);
  assign free     = CW'(DEPTH) - count;
  assign rd_data  = mem[rp];
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_en && rd_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
