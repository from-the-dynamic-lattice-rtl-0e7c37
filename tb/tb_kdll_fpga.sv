// tb_kdll_fpga: self-checking test of one KDLL FPGA block.
//
// The block is closed on itself as a 1x1x1 torus: every outgoing channel
// is wired to the opposite incoming channel, so a ball leaving across a
// face comes back in through the opposite face and edge moves use the
// relay.  The test
//   - runs the neighbour self-test and expects a pass, then corrupts one
//     lane during a second run and expects an identifier error;
//   - runs the ball test step by step: after each landing it reads all 32
//     visit counters, finds where the ball went, and checks that exactly
//     one counter rose by one and that the move is one of the 12 FCC
//     neighbour moves on the 4x4x4 periodic lattice;
//   - sorts each move into in-block, one channel hop, or relayed, checks
//     that each kind has one fixed latency (2 clocks in-block) and that
//     the event outputs agree, and requires every kind to occur;
//   - checks every cell was visited and that the spread of visits,
//     phi = (nmax-nmin)/nmax, falls as the walk gets longer.
module tb_kdll_fpga;
  import mdll_pkg::*;
  localparam int A = 4, B = 4, E = 4, NC = A * B * E / 2;
  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  cmd_e             cmd;
  logic             seed_here;
  logic [4:0]       seed_cell, rd_cell;
  logic             tx_frame [NCH];
  logic [3:0]       tx_lanes [NCH];
  logic             rx_frame [NCH];
  logic [3:0]       rx_lanes [NCH];
  logic [3:0]       corrupt;
  up_t              up;
  logic             ev_local, ev_send, ev_relay;
  logic [31:0]      rd_visits;
  int               checks = 0, failures = 0;
  int               ca [NC], cb [NC], cc [NC];
  longint           cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar ch = 0; ch < 6; ch++) begin : g_loop
    assign rx_frame[ch] = tx_frame[ch ^ 1];
    assign rx_lanes[ch] = tx_lanes[ch ^ 1] ^ ((ch == 2) ? corrupt : 4'd0);
  end

  kdll_fpga #(.FX(1), .FY(1), .FZ(1)) dut (
    .clk, .rst_n, .pos_x(4'd0), .pos_y(4'd0), .pos_z(4'd0), .cmd, .seed_here, .seed_cell,
    .tx_frame, .tx_lanes, .rx_frame, .rx_lanes, .up, .ev_local, .ev_send, .ev_relay,
    .rd_cell, .rd_visits);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counters.
  int n_ev_local = 0, n_ev_send = 0, n_ev_relay = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_local) n_ev_local++;
    if (ev_send)  n_ev_send++;
    if (ev_relay) n_ev_relay++;
  end

  task automatic issue(input cmd_e c);
    cmd = c;
    @(negedge clk);
    cmd = CMD_NOP;
  endtask

  int vis [NC];
  task automatic read_all();
    for (int n = 0; n < NC; n++) begin
      rd_cell = 5'(n);
      #1;
      vis[n] = int'(rd_visits);
    end
  endtask

  function automatic int wrapd(input int d);
    int r;
    r = ((d % 4) + 4) % 4;
    return (r == 3) ? -1 : r;
  endfunction

  function automatic real phi();
    int mx, mn;
    mx = vis[0]; mn = vis[0];
    for (int n = 1; n < NC; n++) begin
      if (vis[n] > mx) mx = vis[n];
      if (vis[n] < mn) mn = vis[n];
    end
    return real'(mx - mn) / real'(mx);
  endfunction

  initial begin
    int k, pos, nxt, nup, dx, dy, dz, nz1, hops, lat;
    int lat_kind [3];
    int n_kind [3];
    int prev [NC];
    real phi_early, phi_late;
    longint t0;
    logic e_loc, e_snd, e_rly;

    // Independent list of cell coordinates: even-parity nodes in raster order.
    k = 0;
    for (int c = 0; c < E; c++)
      for (int b = 0; b < B; b++)
        for (int a = 0; a < A; a++)
          if ((a + b + c) % 2 == 0) begin
            ca[k] = a; cb[k] = b; cc[k] = c; k++;
          end
    for (int i = 0; i < 3; i++) begin lat_kind[i] = -1; n_kind[i] = 0; end

    cmd = CMD_NOP; seed_here = 1'b1; seed_cell = 5'd13; rd_cell = '0; corrupt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- neighbour self-test
    issue(CMD_CLEAR);
    check(!up.id_all && !up.id_err, "id flags clear");
    issue(CMD_IDTEST);
    repeat (30) @(negedge clk);
    check(up.id_all && !up.id_err, "self-test passes in loopback");
    issue(CMD_CLEAR);
    corrupt = 4'b0100;
    issue(CMD_IDTEST);
    repeat (30) @(negedge clk);
    corrupt = '0;
    check(up.id_err && !up.id_all, "corrupted channel detected");

    // ---------------- ball test
    issue(CMD_CLEAR);
    read_all();
    check(up.holding, "seed cell holds the ball");
    for (int n = 0; n < NC; n++) check(vis[n] == ((n == 13) ? 1 : 0), "visits after clear");
    pos = 13;
    prev = vis;
    for (int s = 0; s < 3000; s++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      t0 = cyc;
      e_loc = 0; e_snd = 0; e_rly = 0;
      cmd = CMD_STEP;
      @(negedge clk);
      cmd = CMD_NOP;
      while (!up.landed) begin
        @(posedge clk);
        e_loc |= ev_local; e_snd |= ev_send; e_rly |= ev_relay;
        #1;
        if (cyc - t0 > 100) break;
      end
      lat = int'(cyc - t0);
      check(up.landed, "ball landed");
      @(negedge clk);
      read_all();
      nup = 0; nxt = -1;
      for (int n = 0; n < NC; n++) begin
        if (vis[n] == prev[n] + 1) begin nup++; nxt = n; end
        else if (vis[n] != prev[n]) nup += 100;
      end
      check(nup == 1, $sformatf("step %0d: one counter rose (%0d)", s, nup));
      if (nup != 1) break;
      dx = wrapd(ca[nxt] - ca[pos]);
      dy = wrapd(cb[nxt] - cb[pos]);
      dz = wrapd(cc[nxt] - cc[pos]);
      nz1 = (dx != 0) + (dy != 0) + (dz != 0);
      check(nz1 == 2 && dx != 2 && dy != 2 && dz != 2 && nxt != pos,
            $sformatf("step %0d: %0d -> %0d is an FCC move", s, pos, nxt));
      // how many faces of the block did the move cross?
      hops = (ca[pos] + dx < 0 || ca[pos] + dx >= A) + (cb[pos] + dy < 0 || cb[pos] + dy >= B)
           + (cc[pos] + dz < 0 || cc[pos] + dz >= E);
      n_kind[hops]++;
      if (lat_kind[hops] < 0) lat_kind[hops] = lat;
      check(lat == lat_kind[hops], $sformatf("latency of a %0d-hop move: %0d vs %0d", hops, lat, lat_kind[hops]));
      check(e_loc == (hops == 0) && e_snd == (hops > 0) && e_rly == (hops == 2),
            $sformatf("events for a %0d-hop move", hops));
      pos = nxt;
      prev = vis;
      if (s == 299) phi_early = phi();
    end
    phi_late = phi();
    for (int n = 0; n < NC; n++) check(vis[n] > 0, $sformatf("cell %0d visited", n));
    check(lat_kind[0] == 2, $sformatf("in-block hand-off in 2 clocks (%0d)", lat_kind[0]));
    check(lat_kind[1] > lat_kind[0] && lat_kind[2] > lat_kind[1], "hop latencies ordered");
    for (int i = 0; i < 3; i++) check(n_kind[i] > 0, $sformatf("move kind %0d happened %0d times", i, n_kind[i]));
    check(n_ev_relay == n_kind[2] && n_ev_local == n_kind[0], "event counts");
    check(phi_late < phi_early, $sformatf("spread falls: %f -> %f", phi_early, phi_late));
    check(!up.collision, "no collision");
    $display("moves: in-block %0d (lat %0d), one hop %0d (lat %0d), relayed %0d (lat %0d); phi %f -> %f",
             n_kind[0], lat_kind[0], n_kind[1], lat_kind[1], n_kind[2], lat_kind[2], phi_early, phi_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
