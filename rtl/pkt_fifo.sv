// pkt_fifo: small first-in first-out queue of channel packets.
//
// Sits between the packet sources of one outgoing channel (local cells,
// relayed packets, identifiers) and its serialiser, which takes one packet
// every few clocks.  A write while full is dropped and reported on
// overflow for one clock.  Read data is valid whenever empty is low
// (first-word fall-through); rd pops it.  DEPTH must be a power of two.
module pkt_fifo
  import mdll_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  input  pkt_t wdata,
  input  logic rd,
  output pkt_t rdata,
  output logic empty,
  output logic overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  pkt_t        mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        full;

  assign empty = (wp == rp);
  assign full  = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr && full;
      if (wr && !full) wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full) mem[wp[AW-1:0]] <= wdata;
  end

endmodule
