// chan_rx: receive half of one inter-FPGA serial channel.
//
// Collects LANES bits per clock while frame is high, least significant beat
// first, and after BEATS beats presents the packet for one clock with
// out_valid.  A frame line that drops in the middle of a packet discards
// the partial packet.  Framing and beat order match chan_tx; they are this
// design's choices.
//
// Timing: out_valid rises the clock after the last beat is sampled.
module chan_rx
  import mdll_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame,
  input  logic [LANES-1:0] lanes,
  output logic             out_valid,
  output pkt_t             out_pkt
);

  localparam int unsigned BEATS = (PKT_W + LANES - 1) / LANES;
  localparam int unsigned PW    = BEATS * LANES;
  localparam int unsigned CNTW  = $clog2(BEATS + 1);

  logic [PW-1:0]   acc;
  logic [CNTW-1:0] beat;
  logic [PW-1:0]   full;

  // The packet as it will be once the current beat is added at the top.
  assign full = {lanes, acc[PW-1:LANES]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      beat      <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (frame) begin
        acc <= full;
        if (beat == CNTW'(BEATS - 1)) begin
          beat      <= '0;
          out_valid <= 1'b1;
          out_pkt   <= pkt_t'(full[PKT_W-1:0]);
        end else begin
          beat <= beat + 1'b1;
        end
      end else begin
        beat <= '0;
      end
    end
  end

endmodule
