// tb_kdll_cell: self-checking test of one KDLL cell.
//
// A model of the 64-bit LFSR (taps 64,63,61,60) predicts the direction the
// cell draws at each STEP, (r[15:0]*12)>>16.  The test checks CLEAR (seed
// and non-seed), the one-clock ball_out pulse and its direction, that a
// cell without the ball ignores STEP, visit counting and the landed pulse,
// and that all 12 directions occur.
module tb_kdll_cell;
  import mdll_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  cmd_e        cmd;
  logic        seed_cell, ball_in;
  logic [63:0] rng_seed, model;
  logic        ball_out, holding, landed;
  fcc_dir_t    ball_dir;
  logic [31:0] visits;
  int          checks = 0, failures = 0;
  int          seen [12];

  always #5 clk = ~clk;

  kdll_cell dut (.clk, .rst_n, .cmd, .seed_cell, .rng_seed, .ball_in,
                 .ball_out, .ball_dir, .holding, .landed, .visits);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model advances on every rising edge after the CLEAR edge.
  always @(posedge clk) begin
    if (cmd == CMD_CLEAR) model <= (rng_seed == 0) ? 64'd1 : rng_seed;
    else model <= {model[62:0], model[63] ^ model[62] ^ model[60] ^ model[59]};
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_dir, v;
    cmd = CMD_NOP; seed_cell = 1'b0; ball_in = 1'b0; rng_seed = 64'h0123_4567_89AB_CDEF;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // CLEAR as a non-seed cell
    cmd = CMD_CLEAR;
    @(negedge clk);
    cmd = CMD_NOP;
    check(visits == 0 && !holding, "clear non-seed");
    cmd = CMD_STEP;
    @(negedge clk);
    cmd = CMD_NOP;
    check(!ball_out, "no ball, no hand-off");
    // CLEAR as the seed cell
    seed_cell = 1'b1;
    cmd = CMD_CLEAR;
    @(negedge clk);
    cmd = CMD_NOP;
    seed_cell = 1'b0;
    check(visits == 1 && holding, "clear seed");
    v = 1;
    for (int i = 0; i < 400; i++) begin
      repeat ($urandom_range(0, 7)) @(negedge clk);
      exp_dir = int'(({16'd0, model[15:0]} * 32'd12) >> 16);
      cmd = CMD_STEP;
      @(negedge clk);
      cmd = CMD_NOP;
      check(ball_out && !holding, "ball_out pulse");
      check(int'(ball_dir) == exp_dir, $sformatf("dir %0d exp %0d", ball_dir, exp_dir));
      if (ball_dir < 12) seen[ball_dir]++;
      @(negedge clk);
      check(!ball_out, "ball_out one clock");
      // ball comes back
      ball_in = 1'b1;
      @(negedge clk);
      ball_in = 1'b0;
      v++;
      check(holding && landed && visits == 32'(v), "arrival counted");
      @(negedge clk);
      check(!landed, "landed one clock");
    end
    for (int d = 0; d < 12; d++) check(seen[d] > 10, $sformatf("direction %0d drawn %0d times", d, seen[d]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
