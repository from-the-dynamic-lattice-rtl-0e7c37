// tb_pcb_sync: self-checking test of one board's synchronisation stage.
//
// Random commands and random status words go in; the test checks that
// the command reaches both the next board and the local FPGAs exactly one
// clock later, and that the status towards the control unit is, one clock
// later (and the local copy LOC_DELAY=3 clocks later still on a second,
// delayed instance), and that the status towards the control unit is, one
// clock later, the OR (landed, id_err, collision, holding) or AND (id_all) of the
// four local words and the downstream word.
module tb_pcb_sync;
  import mdll_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  cmd_e cmd_in, cmd_out, cmd_loc;
  up_t  up_loc [4];
  up_t  up_in, up_out;
  cmd_e prev_cmd;
  cmd_e cmd_out_d, cmd_loc_d;
  up_t  up_out_d;
  cmd_e hist [$];
  logic [4:0] exp_or_bits;
  logic       exp_and;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  pcb_sync dut (.clk, .rst_n, .cmd_in, .cmd_out, .cmd_loc, .up_loc, .up_in, .up_out);
  pcb_sync #(.LOC_DELAY(3)) dut_d (.clk, .rst_n, .cmd_in, .cmd_out(cmd_out_d), .cmd_loc(cmd_loc_d),
                                   .up_loc, .up_in, .up_out(up_out_d));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic up_t rnd_up();
    up_t u;
    u = up_t'($urandom());
    // make the OR lines rare so that both values occur
    u.landed    = ($urandom_range(0, 9) == 0);
    u.id_err    = ($urandom_range(0, 9) == 0);
    u.collision = ($urandom_range(0, 9) == 0);
    u.holding   = ($urandom_range(0, 9) == 0);
    u.id_all    = ($urandom_range(0, 9) != 0);
    return u;
  endfunction

  initial begin
    up_t e;
    cmd_in = CMD_NOP; up_in = UP_NEUTRAL;
    for (int f = 0; f < 4; f++) up_loc[f] = UP_NEUTRAL;
    repeat (2) @(negedge clk);
    check(cmd_out == CMD_NOP && up_out == UP_NEUTRAL, "reset state");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      cmd_in = cmd_e'($urandom_range(0, 3));
      up_in  = rnd_up();
      for (int f = 0; f < 4; f++) up_loc[f] = rnd_up();
      e.landed    = up_in.landed    | up_loc[0].landed    | up_loc[1].landed    | up_loc[2].landed    | up_loc[3].landed;
      e.id_err    = up_in.id_err    | up_loc[0].id_err    | up_loc[1].id_err    | up_loc[2].id_err    | up_loc[3].id_err;
      e.collision = up_in.collision | up_loc[0].collision | up_loc[1].collision | up_loc[2].collision | up_loc[3].collision;
      e.holding   = up_in.holding   | up_loc[0].holding   | up_loc[1].holding   | up_loc[2].holding   | up_loc[3].holding;
      e.id_all    = up_in.id_all    & up_loc[0].id_all    & up_loc[1].id_all    & up_loc[2].id_all    & up_loc[3].id_all;
      prev_cmd = cmd_in;
      hist.push_back(cmd_in);
      @(negedge clk);
      check(cmd_out == prev_cmd && cmd_loc == prev_cmd, "command relayed with one clock");
      check(cmd_out_d == prev_cmd, "delayed instance: command to next board in one clock");
      if (hist.size() == 4) check(cmd_loc_d == hist.pop_front(), "delayed instance: local copy after 4 clocks");
      else check(cmd_loc_d == CMD_NOP, "delayed instance: local copy idle at start");
      check(up_out == e, $sformatf("status merge: got %b exp %b", up_out, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
