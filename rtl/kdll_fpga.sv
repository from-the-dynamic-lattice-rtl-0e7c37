// kdll_fpga: one KDLL FPGA, a block of the machine's FCC lattice.
//
// The FPGA implements a virtual reduced cubic lattice (RCL) of
// ALPHA x BETA x ETA nodes, local coordinates (a,b,c); a KDLL cell sits in
// every second node, where a+b+c is even, giving ALPHA*BETA*ETA/2 cells
// (32 for the 4x4x4 block).  With even block sides the global parity of a
// node equals its local parity, so all FPGAs carry the same cell layout and
// one configuration serves the whole machine.  Cell number
// n = ((c*BETA + b)*ALPHA + a) / 2.
//
// A cell hands the ball to one of its 12 FCC neighbours.  When the
// neighbour lies in the same block the hand-off is direct and takes one
// clock.  Otherwise the neighbour lies in one of the 18 surrounding blocks
// (6 across a face, 12 across an edge).  These 18 directions are reduced
// to the 6 cubic channels: the packet leaves on the x channel if the
// neighbour block differs in x, else on y, else on z, and carries the hops
// still to make (rem_y, rem_z) and the target cell's coordinates in the
// final block.  A block receiving a packet with a hop left relays it on
// the next channel (the "relay" event); otherwise it delivers the ball.
// Each outgoing channel has a small queue (pkt_fifo) in front of its
// serialiser (chan_tx); each incoming one a deserialiser (chan_rx).
//
// Neighbour self-test: on CMD_IDTEST the block sends on each channel an
// identifier holding its own position (pos_x,pos_y,pos_z) and the channel
// number.  A receiver expects the position of the neighbour in that
// direction on the FX x FY x FZ torus of blocks and the opposite channel
// number; it records per channel "received" and "wrong".
//
// Status to the chain (up): landed (a cell got the ball this clock),
// id_err, id_all, collision (two packets for one channel queue in the same
// clock, or a queue overflow; sticky until CLEAR) and holding.
// ev_local / ev_send / ev_relay pulse for an in-block hand-off, a packet
// leaving a cell towards another block, and a relayed packet.
// rd_cell selects the cell whose visit counter appears on rd_visits
// (combinational) for reading out the results.
//
// Following the machine: cells on every second RCL node, 6 channels,
// serial packets, per-cell generators, identifier self-test.  This
// design's own: the x-then-y-then-z relay order, the packet layout, the
// queue depth and the collision rule.  Only even block sides are supported
// (odd sides need the complementary P/U block pairs, not built here).
module kdll_fpga
  import mdll_pkg::*;
#(
  parameter int unsigned ALPHA  = 4,   // RCL nodes along x
  parameter int unsigned BETA   = 4,   // RCL nodes along y
  parameter int unsigned ETA    = 4,   // RCL nodes along z
  parameter int unsigned FX     = 6,   // blocks of the torus along x
  parameter int unsigned FY     = 6,   // blocks along y
  parameter int unsigned FZ     = 3,   // blocks along z
  parameter int unsigned LANES  = 4,   // data lanes per channel direction
  parameter int unsigned VW     = 32,  // visit counter width
  parameter int unsigned RNG_W  = 64,  // LFSR length
  parameter int unsigned QDEPTH = 4,   // outgoing packet queue depth
  localparam int unsigned NC    = ALPHA * BETA * ETA / 2,
  localparam int unsigned CIW   = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CW-1:0]    pos_x,
  input  logic [CW-1:0]    pos_y,
  input  logic [CW-1:0]    pos_z,
  input  cmd_e             cmd,
  input  logic             seed_here,
  input  logic [CIW-1:0]   seed_cell,
  output logic             tx_frame [NCH],
  output logic [LANES-1:0] tx_lanes [NCH],
  input  logic             rx_frame [NCH],
  input  logic [LANES-1:0] rx_lanes [NCH],
  output up_t              up,
  output logic             ev_local,
  output logic             ev_send,
  output logic             ev_relay,
  input  logic [CIW-1:0]   rd_cell,
  output logic [VW-1:0]    rd_visits
);

  initial begin
    assert (ALPHA % 2 == 0 && BETA % 2 == 0 && ETA % 2 == 0)
      else $error("kdll_fpga: block sides must be even");
    assert (ALPHA <= 16 && BETA <= 16 && ETA <= 16)
      else $error("kdll_fpga: block side exceeds the packet coordinate field");
  end

  // ------------------------------------------------------ cell geometry
  function automatic int cell_a(input int n);
    int row;
    row = n / int'(ALPHA / 2);
    return 2 * (n % int'(ALPHA / 2)) + ((row % int'(BETA)) + (row / int'(BETA))) % 2;
  endfunction
  function automatic int cell_b(input int n);
    return (n / int'(ALPHA / 2)) % int'(BETA);
  endfunction
  function automatic int cell_c(input int n);
    return (n / int'(ALPHA / 2)) / int'(BETA);
  endfunction
  function automatic int cell_n(input int a, input int b, input int c);
    return ((c * int'(BETA) + b) * int'(ALPHA) + a) / 2;
  endfunction

  // ------------------------------------------------------------- cells
  logic           c_ball_out [NC];
  fcc_dir_t       c_ball_dir [NC];
  logic           c_holding  [NC];
  logic           c_landed   [NC];
  logic [VW-1:0]  c_visits   [NC];
  logic [NC-1:0]  arrive;
  logic [15:0]    fpga_id;

  assign fpga_id = 16'((int'(pos_z) * int'(FY) + int'(pos_y)) * int'(FX) + int'(pos_x));

  for (genvar n = 0; n < int'(NC); n++) begin : g_cell
    logic [15:0] gid;
    assign gid = 16'(int'(fpga_id) * int'(NC) + n);
    kdll_cell #(.VW(VW), .RNG_W(RNG_W)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd       (cmd),
      .seed_cell (seed_here && (seed_cell == CIW'(n))),
      .rng_seed  (RNG_W'({gid ^ 16'hACE1, ~gid, {gid[7:0], gid[15:8]} ^ 16'h5A3C,
                          gid ^ 16'h1F2E})),
      .ball_in   (arrive[n]),
      .ball_out  (c_ball_out[n]),
      .ball_dir  (c_ball_dir[n]),
      .holding   (c_holding[n]),
      .landed    (c_landed[n]),
      .visits    (c_visits[n])
    );
  end

  assign rd_visits = c_visits[rd_cell];

  // ------------------------------------------------- channel receivers
  logic rx_v   [NCH];
  pkt_t rx_pkt [NCH];

  for (genvar ch = 0; ch < int'(NCH); ch++) begin : g_rx
    chan_rx #(.LANES(LANES)) u_rx (
      .clk       (clk),
      .rst_n     (rst_n),
      .frame     (rx_frame[ch]),
      .lanes     (rx_lanes[ch]),
      .out_valid (rx_v[ch]),
      .out_pkt   (rx_pkt[ch])
    );
  end

  // ---------------------------------- routing of balls and relayed packets
  logic [NCH-1:0] q_wr;
  pkt_t           q_wdata [NCH];
  logic [NCH-1:0] q_clash;
  logic           lcl_any, snd_any, rly_any;

  always_comb begin
    int       na, nb, nc, fx, fy, fz;
    int       och;
    pkt_t     p;
    ball_pl_t bp;
    id_pl_t   ip;
    na = 0; nb = 0; nc = 0; fx = 0; fy = 0; fz = 0; och = 0;
    p  = '0;
    bp = '0;
    ip = '0;
    arrive  = '0;
    q_wr    = '0;
    q_clash = '0;
    lcl_any = 1'b0;
    snd_any = 1'b0;
    rly_any = 1'b0;
    for (int ch = 0; ch < int'(NCH); ch++) q_wdata[ch] = '0;

    // Identifiers on every channel.
    if (cmd == CMD_IDTEST) begin
      for (int ch = 0; ch < int'(NCH); ch++) begin
        ip     = '0;
        ip.px  = pos_x;
        ip.py  = pos_y;
        ip.pz  = pos_z;
        ip.ch  = 3'(ch);
        p.typ  = PK_ID;
        p.pl   = ip;
        if (q_wr[ch]) q_clash[ch] = 1'b1;
        else begin
          q_wr[ch]    = 1'b1;
          q_wdata[ch] = p;
        end
      end
    end

    // Received ball packets: deliver or relay.
    for (int ch = 0; ch < int'(NCH); ch++) begin
      if (rx_v[ch] && rx_pkt[ch].typ == PK_BALL) begin
        bp = ball_pl_t'(rx_pkt[ch].pl);
        if (bp.rem_y != 2'b00) begin
          p       = rx_pkt[ch];
          och     = (bp.rem_y == 2'b01) ? int'(CH_YP) : int'(CH_YM);
          bp.rem_y = 2'b00;
          p.pl    = bp;
          if (q_wr[och]) q_clash[och] = 1'b1;
          else begin
            q_wr[och]    = 1'b1;
            q_wdata[och] = p;
          end
          rly_any = 1'b1;
        end else if (bp.rem_z != 2'b00) begin
          p       = rx_pkt[ch];
          och     = (bp.rem_z == 2'b01) ? int'(CH_ZP) : int'(CH_ZM);
          bp.rem_z = 2'b00;
          p.pl    = bp;
          if (q_wr[och]) q_clash[och] = 1'b1;
          else begin
            q_wr[och]    = 1'b1;
            q_wdata[och] = p;
          end
          rly_any = 1'b1;
        end else begin
          arrive[cell_n(int'(bp.tgt_a), int'(bp.tgt_b), int'(bp.tgt_c))] = 1'b1;
        end
      end
    end

    // Balls leaving cells.
    for (int n = 0; n < int'(NC); n++) begin
      if (c_ball_out[n]) begin
        na = cell_a(n) + dir_dx(int'(c_ball_dir[n]));
        nb = cell_b(n) + dir_dy(int'(c_ball_dir[n]));
        nc = cell_c(n) + dir_dz(int'(c_ball_dir[n]));
        fx = (na < 0) ? -1 : (na >= int'(ALPHA)) ? 1 : 0;
        fy = (nb < 0) ? -1 : (nb >= int'(BETA))  ? 1 : 0;
        fz = (nc < 0) ? -1 : (nc >= int'(ETA))   ? 1 : 0;
        na = na - fx * int'(ALPHA);
        nb = nb - fy * int'(BETA);
        nc = nc - fz * int'(ETA);
        if (fx == 0 && fy == 0 && fz == 0) begin
          arrive[cell_n(na, nb, nc)] = 1'b1;
          lcl_any = 1'b1;
        end else begin
          bp       = '0;
          bp.tgt_a = CW'(na);
          bp.tgt_b = CW'(nb);
          bp.tgt_c = CW'(nc);
          if (fx != 0) begin
            och      = (fx > 0) ? int'(CH_XP) : int'(CH_XM);
            bp.rem_y = 2'(fy);
            bp.rem_z = 2'(fz);
          end else if (fy != 0) begin
            och      = (fy > 0) ? int'(CH_YP) : int'(CH_YM);
            bp.rem_z = 2'(fz);
          end else begin
            och      = (fz > 0) ? int'(CH_ZP) : int'(CH_ZM);
          end
          p.typ = PK_BALL;
          p.pl  = bp;
          if (q_wr[och]) q_clash[och] = 1'b1;
          else begin
            q_wr[och]    = 1'b1;
            q_wdata[och] = p;
          end
          snd_any = 1'b1;
        end
      end
    end
  end

  // ----------------------------------------- outgoing queues and senders
  logic [NCH-1:0] q_empty, q_ovf, tx_ready;
  pkt_t           q_rdata [NCH];

  for (genvar ch = 0; ch < int'(NCH); ch++) begin : g_tx
    pkt_fifo #(.DEPTH(QDEPTH)) u_q (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr       (q_wr[ch]),
      .wdata    (q_wdata[ch]),
      .rd       (tx_ready[ch]),
      .rdata    (q_rdata[ch]),
      .empty    (q_empty[ch]),
      .overflow (q_ovf[ch])
    );
    chan_tx #(.LANES(LANES)) u_tx (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (!q_empty[ch]),
      .in_ready (tx_ready[ch]),
      .in_pkt   (q_rdata[ch]),
      .frame    (tx_frame[ch]),
      .lanes    (tx_lanes[ch])
    );
  end

  // ------------------------------------------------ identifier checking
  logic [NCH-1:0] id_ok, id_bad;
  logic           coll_q;

  function automatic logic [CW-1:0] wrap_step(input logic [CW-1:0] v, input int d,
                                              input int size);
    int r;
    r = (int'(v) + d + size) % size;
    return CW'(r);
  endfunction

  logic [NCH-1:0] id_hit, id_miss;

  always_comb begin
    id_pl_t ip;
    logic   good;
    id_hit  = '0;
    id_miss = '0;
    for (int ch = 0; ch < int'(NCH); ch++) begin
      ip   = id_pl_t'(rx_pkt[ch].pl);
      good = (ip.px == wrap_step(pos_x, (ch == int'(CH_XP)) ? 1 : (ch == int'(CH_XM)) ? -1 : 0, int'(FX)))
          && (ip.py == wrap_step(pos_y, (ch == int'(CH_YP)) ? 1 : (ch == int'(CH_YM)) ? -1 : 0, int'(FY)))
          && (ip.pz == wrap_step(pos_z, (ch == int'(CH_ZP)) ? 1 : (ch == int'(CH_ZM)) ? -1 : 0, int'(FZ)))
          && (int'(ip.ch) == chan_opp(ch));
      if (rx_v[ch] && rx_pkt[ch].typ == PK_ID) begin
        id_hit[ch]  = good;
        id_miss[ch] = !good;
      end else if (rx_v[ch] && rx_pkt[ch].typ != PK_BALL) begin
        id_miss[ch] = 1'b1;   // unknown packet type
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_ok  <= '0;
      id_bad <= '0;
      coll_q <= 1'b0;
    end else if (cmd == CMD_CLEAR) begin
      id_ok  <= '0;
      id_bad <= '0;
      coll_q <= 1'b0;
    end else begin
      if ((q_clash | q_ovf) != '0) coll_q <= 1'b1;
      id_ok  <= id_ok | id_hit;
      id_bad <= id_bad | id_miss;
    end
  end

  // ------------------------------------------------------------ status
  always_comb begin
    up           = '0;
    up.id_err    = |id_bad;
    up.id_all    = &id_ok;
    up.collision = coll_q;
    for (int n = 0; n < int'(NC); n++) begin
      up.landed  = up.landed  | c_landed[n];
      up.holding = up.holding | c_holding[n];
    end
  end

  assign ev_local = lcl_any;
  assign ev_send  = snd_any;
  assign ev_relay = rly_any;

endmodule
