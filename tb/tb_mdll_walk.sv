// tb_mdll_walk: move-by-move check of the ball walk on a small machine.
//
// The machine is built with 2x2x2 blocks (4 cells per FPGA), M=N=2 and
// DELTA=3: a 4x4x3 torus of 48 FPGAs, 192 cells, an
// 8x8x6 periodic FCC lattice.  Small blocks make most moves cross one or
// two block faces, and a ring of 4 blocks tells +x from -x, so this test
// checks the channel wiring and the relay direction that a single looped
// block cannot.  After every step it reads all visit counters, finds the
// one that rose, converts the cell to global lattice coordinates
// independently of the design, and checks that the move is one of the 12
// FCC moves on the periodic lattice.  It also runs the neighbour
// self-test, counts in-block, one-hop and relayed moves, and checks that
// the spread of visits phi = (nmax-nmin)/nmax is smaller after the whole
// walk than after its first tenth.
module tb_mdll_walk;
  timeunit 1ns;
  timeprecision 1ps;
  import mdll_pkg::*;
  localparam int FX = 4, FY = 4, FZ = 3, NF = FX * FY * FZ, NC = 4;
  localparam int GX = 2 * FX, GY = 2 * FY, GZ = 2 * FZ;
  localparam int NSTEPS = 4000;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, mode_id;
  logic [31:0] n_steps, steps, cycles;
  logic [5:0]  seed_fpga, rd_fpga;
  logic [1:0]  seed_cell, rd_cell;
  logic        busy, done, id_pass, id_fail, lost, collision;
  logic [31:0] rd_visits;
  logic        ev_local, ev_send, ev_relay;
  int          checks = 0, failures = 0;
  int          vis [NF * NC], prev [NF * NC];

  always #5 clk = ~clk;

  mdll_top #(.ALPHA(2), .BETA(2), .ETA(2), .M(2), .N(2), .DELTA(3)) dut (
    .clk, .rst_n, .start, .mode_id, .n_steps, .seed_fpga, .seed_cell,
    .busy, .done, .steps, .cycles, .id_pass, .id_fail, .lost, .collision,
    .rd_fpga, .rd_cell, .rd_visits, .ev_local, .ev_send, .ev_relay);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NSTEPS * 150 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Global coordinates of cell n of FPGA f: the even nodes of a 2x2x2 block
  // in raster order are (0,0,0) (1,1,0) (1,0,1) (0,1,1).
  function automatic void gpos(input int id, output int gx, output int gy, output int gz);
    int f, n;
    int la [4] = '{0, 1, 1, 0};
    int lb [4] = '{0, 1, 0, 1};
    int lc [4] = '{0, 0, 1, 1};
    f = id / NC;
    n = id % NC;
    gx = 2 * (f % FX) + la[n];
    gy = 2 * ((f / FX) % FY) + lb[n];
    gz = 2 * (f / (FX * FY)) + lc[n];
  endfunction

  function automatic int wrapd(input int d, input int size);
    int r;
    r = ((d % size) + size) % size;
    return (r > size / 2) ? r - size : r;
  endfunction

  function automatic real phi();
    int mx, mn;
    mx = vis[0]; mn = vis[0];
    for (int i = 1; i < NF * NC; i++) begin
      if (vis[i] > mx) mx = vis[i];
      if (vis[i] < mn) mn = vis[i];
    end
    return real'(mx - mn) / real'(mx);
  endfunction

  task automatic read_all();
    for (int i = 0; i < NF * NC; i++) begin
      rd_fpga = 6'(i / NC);
      rd_cell = 2'(i % NC);
      #0.001;
      vis[i] = int'(rd_visits);
    end
  endtask

  initial begin
    int pos, nxt, nup, x0, y0, z0, x1, y1, z1, dx, dy, dz, hops;
    int n_kind [3];
    real phi_early, phi_late;
    n_kind = '{0, 0, 0};
    start = 1'b0; mode_id = 1'b0; n_steps = '0;
    seed_fpga = 6'd21; seed_cell = 2'd2; rd_fpga = '0; rd_cell = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // neighbour self-test
    mode_id = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check(id_pass && !id_fail, "self-test passes");

    // ball test: one long run; each landing is seen as the step counter
    // moving on, long before the next STEP can reach the cells
    mode_id = 1'b0;
    pos = 21 * NC + 2;
    n_steps = 32'(NSTEPS);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    prev = '{default: 0};
    prev[pos] = 1;
    begin
      int seen;
      seen = 0;
      while (!done) begin
        @(posedge clk);
        #0.5;
        if (steps != 32'(seen)) begin
          read_all();
          nup = 0; nxt = -1;
          for (int i = 0; i < NF * NC; i++) begin
            if (vis[i] == prev[i] + 1) begin nup++; nxt = i; end
            else if (vis[i] != prev[i]) nup += 100;
          end
          check(nup == 1, $sformatf("step %0d: one counter rose (%0d)", seen, nup));
          if (nup == 1) begin
            gpos(pos, x0, y0, z0);
            gpos(nxt, x1, y1, z1);
            dx = wrapd(x1 - x0, GX);
            dy = wrapd(y1 - y0, GY);
            dz = wrapd(z1 - z0, GZ);
            check((dx * dx + dy * dy + dz * dz) == 2 && dx * dx <= 1 && dy * dy <= 1 && dz * dz <= 1,
                  $sformatf("step %0d: (%0d,%0d,%0d)->(%0d,%0d,%0d) is an FCC move", seen, x0, y0, z0, x1, y1, z1));
            hops = ((x0 / 2) != (x1 / 2)) + ((y0 / 2) != (y1 / 2)) + ((z0 / 2) != (z1 / 2));
            n_kind[hops]++;
            pos = nxt;
          end
          prev = vis;
          seen++;
          if (seen == NSTEPS / 10) phi_early = phi();
        end
      end
      check(seen == NSTEPS && steps == NSTEPS && !lost && !collision,
            $sformatf("run of %0d steps: seen %0d lost %0d", steps, seen, lost));
    end
    phi_late = phi();
    check(phi_late < phi_early, $sformatf("spread of visits falls: %f -> %f", phi_early, phi_late));
    for (int k = 0; k < 3; k++) check(n_kind[k] > 0, $sformatf("move kind %0d happened %0d times", k, n_kind[k]));
    $display("moves: in-block %0d, one hop %0d, relayed %0d; phi %f after %0d steps, %f after %0d",
             n_kind[0], n_kind[1], n_kind[2], phi_early, NSTEPS / 10, phi_late, NSTEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
