// tb_ckdll_ctrl: self-checking test of the CKDLL control unit.
//
// A behavioural stand-in for the chain of boards answers the commands
// after a fixed chain delay: CLEAR makes a cell hold the ball, every STEP
// is answered by one "landed" pulse after a random delay.  The test runs
// the ball test (step count, one STEP per landing, cycles counted), the
// neighbour test with good and with wrong identifiers, a run whose ball is
// never placed, and one whose ball is lost in flight.
module tb_ckdll_ctrl;
  import mdll_pkg::*;
  localparam int NPCB = 4;
  localparam int CHAIN_LAT = 2 * NPCB + 8;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, mode_id;
  logic [31:0] n_steps, steps, cycles;
  cmd_e        cmd;
  up_t         up;
  logic        busy, done, id_pass, id_fail, lost, collision;
  int          checks = 0, failures = 0;
  // stand-in behaviour knobs
  logic        ids_good = 1'b1;
  logic        drop_ball = 1'b0;
  logic        place_ball = 1'b1;
  int          n_step_cmds = 0;

  always #5 clk = ~clk;

  ckdll_ctrl #(.NPCB(NPCB)) dut (.clk, .rst_n, .start, .mode_id, .n_steps, .cmd, .up,
                                 .busy, .done, .steps, .cycles, .id_pass, .id_fail,
                                 .lost, .collision);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Chain stand-in.
  always @(posedge clk) begin
    if (!rst_n) up <= UP_NEUTRAL;
    else begin
      cmd_e c;
      c = cmd;
      up.landed <= 1'b0;
      if (c == CMD_CLEAR) begin
        fork begin
          repeat (NPCB) @(posedge clk);
          up.holding <= place_ball;
          up.id_all  <= 1'b0;
          up.id_err  <= 1'b0;
        end join_none
      end
      if (c == CMD_IDTEST) begin
        fork begin
          repeat (NPCB + 10) @(posedge clk);
          up.id_all <= 1'b1;
          up.id_err <= !ids_good;
        end join_none
      end
      if (c == CMD_STEP) begin
        n_step_cmds++;
        fork begin
          up.holding <= 1'b0;
          repeat (2 * NPCB + $urandom_range(0, 20)) @(posedge clk);
          if (!drop_ball) begin
            up.landed  <= 1'b1;
            up.holding <= 1'b1;
          end
        end join_none
      end
    end
  end

  task automatic run(input logic m, input int n);
    mode_id = m;
    n_steps = 32'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    start = 1'b0; mode_id = 1'b0; n_steps = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ball test
    n_step_cmds = 0;
    run(1'b0, 50);
    check(steps == 50 && !lost, $sformatf("50 steps, got %0d lost %0d", steps, lost));
    check(n_step_cmds == 50, $sformatf("one STEP per landing, %0d", n_step_cmds));
    check(cycles > 50 * 2 * NPCB && cycles < 50 * (2 * NPCB + 30) + 200, $sformatf("cycles %0d", cycles));
    // neighbour test, good
    ids_good = 1'b1;
    run(1'b1, 0);
    check(id_pass && !id_fail, "id test passes");
    // neighbour test, bad identifiers
    ids_good = 1'b0;
    run(1'b1, 0);
    check(!id_pass && id_fail, "id test fails on wrong identifier");
    // ball never placed
    place_ball = 1'b0;
    run(1'b0, 10);
    check(lost && steps == 0, "no ball placed");
    place_ball = 1'b1;
    // ball lost in flight
    drop_ball = 1'b0;
    fork begin
      repeat (800) @(posedge clk);
      drop_ball = 1'b1;
    end join_none
    run(1'b0, 100000);
    check(lost && steps > 0 && steps < 100000, $sformatf("ball lost after %0d steps", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
