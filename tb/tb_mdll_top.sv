// tb_mdll_top: end-to-end test of the whole machine at its built size.
//
// 108 KDLL FPGAs (3 panels of 3x3 boards, 4 FPGAs per board) on a 6x6x3
// torus, 3456 cells, all parameters at their defaults.  The test
//   1. runs the neighbour self-test: every FPGA checks the identifiers on
//      its 6 channels, wrap-around links included; expects a pass;
//   2. runs the ball test for NSTEPS steps from a seed cell and checks
//      the step count, that the ball was never lost, that no channel queue
//      collided, that the visit counters sum to NSTEPS+1, and the clocks
//      per step against the chain round trip;
//   3. counts how often each mechanism happened (in-block hand-off, packet
//      to another FPGA, relay of an edge move, identifier check) and fails
//      any that never did;
//   4. reports the spread of visits phi = (nmax-nmin)/nmax.
module tb_mdll_top;
  import mdll_pkg::*;
  localparam int NF = 108, NC = 32, NPCB = 27;
  localparam int NSTEPS = 2000;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, mode_id;
  logic [31:0] n_steps, steps, cycles;
  logic [6:0]  seed_fpga, rd_fpga;
  logic [4:0]  seed_cell, rd_cell;
  logic        busy, done, id_pass, id_fail, lost, collision;
  logic [31:0] rd_visits;
  logic        ev_local, ev_send, ev_relay;
  int          checks = 0, failures = 0;
  longint      n_local = 0, n_send = 0, n_relay = 0;

  always #5 clk = ~clk;

  mdll_top dut (.clk, .rst_n, .start, .mode_id, .n_steps, .seed_fpga, .seed_cell,
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
    repeat (NSTEPS * 200 + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_local) n_local++;
    if (ev_send)  n_send++;
    if (ev_relay) n_relay++;
  end

  task automatic run(input logic m, input int n);
    mode_id = m;
    n_steps = 32'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    longint sum;
    int     mx, mn, v, n_id;
    start = 1'b0; mode_id = 1'b0; n_steps = '0;
    seed_fpga = 7'd57; seed_cell = 5'd9; rd_fpga = '0; rd_cell = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. neighbour self-test
    run(1'b1, 0);
    check(id_pass && !id_fail, "neighbour self-test passes on all 648 channels");
    n_id = id_pass ? 1 : 0;

    // 2. ball test
    run(1'b0, NSTEPS);
    check(steps == NSTEPS, $sformatf("steps %0d", steps));
    check(!lost, "ball never lost");
    check(!collision, "no channel collision");
    check(cycles >= 32'(NSTEPS * 4) && cycles <= 32'(NSTEPS * (2 * NPCB + 40) + 200),
          $sformatf("clocks per step %0d/%0d", cycles, steps));
    sum = 0; mx = 0; mn = 1 << 30;
    for (int f = 0; f < NF; f++) begin
      for (int c = 0; c < NC; c++) begin
        rd_fpga = 7'(f);
        rd_cell = 5'(c);
        #1;
        v = int'(rd_visits);
        sum += v;
        if (v > mx) mx = v;
        if (v < mn) mn = v;
      end
    end
    check(sum == NSTEPS + 1, $sformatf("visits sum %0d", sum));

    // 3. mechanisms
    check(n_local > 0, "in-block hand-off happened");
    check(n_send > 0, "packet to another FPGA happened");
    check(n_relay > 0, "relayed edge move happened");
    check(n_id > 0, "identifier test happened");
    check(n_local + n_send == NSTEPS, "every step is one hand-off");
    $display("steps %0d, clocks %0d (%0d per step); in-block %0d, inter-FPGA %0d, relayed %0d",
             steps, cycles, cycles / steps, n_local, n_send, n_relay);
    $display("visits: max %0d min %0d phi %f", mx, mn, real'(mx - mn) / real'(mx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
