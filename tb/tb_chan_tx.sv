// tb_chan_tx: self-checking test of the channel serialiser.
//
// Random packets are offered with random gaps and back to back.  The test
// rebuilds each packet from the lanes itself (LSB beat first, frame high
// on every beat) and compares with what was offered; it checks that the
// first beat follows one clock after the packet is taken and that back-to-
// back packets take exactly BEATS=5 clocks each.
module tb_chan_tx;
  import mdll_pkg::*;
  localparam int LANES = 4;
  localparam int BEATS = 5;
  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             in_valid, in_ready, frame;
  pkt_t             in_pkt;
  logic [LANES-1:0] lanes;
  int               checks = 0, failures = 0;
  pkt_t             sent [$];
  longint           take_cyc [$];
  longint           cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  chan_tx #(.LANES(LANES)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pkt, .frame, .lanes);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent receiver: count beats while frame is high.
  logic [PKT_W-1:0] acc;
  int               beat = 0;
  int               got = 0;
  longint           first_beat_cyc;
  longint           last_done = -1;
  always @(posedge clk) if (rst_n) begin
    if (frame) begin
      if (beat == 0) first_beat_cyc = cyc;
      acc[beat*LANES +: LANES] = lanes;
      beat++;
      if (beat == BEATS) begin
        pkt_t   exp;
        longint tk;
        beat = 0;
        exp = sent.pop_front();
        tk  = take_cyc.pop_front();
        check(pkt_t'(acc) == exp, $sformatf("packet %0d: got %h exp %h", got, acc, exp));
        check(first_beat_cyc == tk + 1, "first beat one clock after take");
        got++;
      end
    end else begin
      check(beat == 0, "frame dropped inside a packet");
    end
  end

  // Record what is taken.
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    sent.push_back(in_pkt);
    take_cyc.push_back(cyc);
  end

  initial begin
    longint t0;
    in_valid = 1'b0; in_pkt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random gaps
    for (int i = 0; i < 200; i++) begin
      in_pkt   = pkt_t'($urandom());
      in_valid = 1'b1;
      do @(negedge clk); while (!(in_ready === 1'b1) || sent.size() == 0 && 0);
      // wait until taken
      while (take_cyc.size() == 0 || sent[$] !== in_pkt) @(negedge clk);
      in_valid = 1'b0;
      repeat ($urandom_range(0, 8)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    // back to back: 100 packets must take 100*BEATS clocks
    t0 = cyc;
    for (int i = 0; i < 100; i++) begin
      in_pkt   = pkt_t'({$urandom()} ^ i);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(cyc - t0 == 100 * BEATS - (BEATS - 1) || cyc - t0 == 100 * BEATS - (BEATS - 1) + 1,
          $sformatf("back-to-back rate: %0d clocks", cyc - t0));
    repeat (20) @(negedge clk);
    check(got == 300, $sformatf("packets received %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
