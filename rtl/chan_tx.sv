// chan_tx: transmit half of one inter-FPGA serial channel.
//
// Neighbouring FPGAs talk over 6 bidirectional channels, one per cubic
// direction.  Each direction of a channel is a group of LVDS pairs; the
// packet is cut into beats of LANES bits and sent least significant beat
// first, one beat per clock, while the frame line is high.  Frames may
// follow each other with no gap: the receiver counts beats.  With 4 data
// lanes at 800 Mb/s a channel carries 3.2 Gb/s.
//
// The lane count, the frame line and the beat order are this design's
// choices; the LVDS pads and serialisers of the FPGA are outside this
// model, which treats one beat per clock.
//
// Interface: valid/ready handshake on in_pkt (taken when both high);
// frame/lanes go to the neighbour's chan_rx.  The first beat appears the
// clock after the packet is taken; one packet every BEATS clocks.
module chan_tx
  import mdll_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  pkt_t             in_pkt,
  output logic             frame,
  output logic [LANES-1:0] lanes
);

  localparam int unsigned BEATS = (PKT_W + LANES - 1) / LANES;
  localparam int unsigned PW    = BEATS * LANES;
  localparam int unsigned CNTW  = $clog2(BEATS + 1);

  logic [PW-1:0]   sh;     // beats still to send after the one on the wire
  logic [CNTW-1:0] cnt;    // beats left including the one on the wire

  assign in_ready = (cnt <= CNTW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      cnt   <= '0;
      frame <= 1'b0;
      lanes <= '0;
    end else if (in_valid && in_ready) begin
      sh    <= PW'(in_pkt) >> LANES;
      lanes <= in_pkt[LANES-1:0];
      frame <= 1'b1;
      cnt   <= CNTW'(BEATS);
    end else if (cnt > CNTW'(1)) begin
      lanes <= sh[LANES-1:0];
      sh    <= sh >> LANES;
      cnt   <= cnt - 1'b1;
    end else begin
      frame <= 1'b0;
      lanes <= '0;
      cnt   <= '0;
    end
  end

endmodule
