// tb_chan_rx: self-checking test of the channel deserialiser.
//
// The test drives frame and lanes itself: random packets cut into 5 beats
// of 4 bits, least significant first, with gaps, back to back, and one
// frame that is cut short.  It checks every reassembled packet, that
// out_valid comes one clock after the last beat, and that the cut frame
// yields nothing.
module tb_chan_rx;
  import mdll_pkg::*;
  localparam int LANES = 4;
  localparam int BEATS = 5;
  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             frame, out_valid;
  logic [LANES-1:0] lanes;
  pkt_t             out_pkt;
  int               checks = 0, failures = 0;
  pkt_t             exp_q [$];
  int               got = 0;

  always #5 clk = ~clk;

  chan_rx #(.LANES(LANES)) dut (.clk, .rst_n, .frame, .lanes, .out_valid, .out_pkt);

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

  task automatic send(input pkt_t p, input int nbeats);
    logic [PKT_W-1:0] v;
    v = p;
    for (int b = 0; b < nbeats; b++) begin
      frame = 1'b1;
      lanes = v[b*LANES +: LANES];
      @(negedge clk);
    end
  endtask

  // Expect output exactly one clock after the last beat.
  int since_last = -1;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      check(exp_q.size() > 0, "unexpected packet");
      if (exp_q.size() > 0) begin
        pkt_t e;
        e = exp_q.pop_front();
        check(out_pkt == e, $sformatf("got %h exp %h", out_pkt, e));
      end
      check(since_last == 1, "latency one clock");
      got++;
    end
  end

  initial begin
    pkt_t p;
    frame = 1'b0; lanes = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      p = pkt_t'($urandom());
      exp_q.push_back(p);
      send(p, BEATS);
      since_last = 0;
      fork begin @(posedge clk); since_last = 1; @(posedge clk); since_last = 2; end join_none
      if (i % 3 == 0) begin
        frame = 1'b0;
        lanes = 4'($urandom());
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      if (i == 150) begin
        // a frame cut after 3 beats is discarded
        send(pkt_t'($urandom()), 3);
        frame = 1'b0;
        @(negedge clk);
      end
    end
    frame = 1'b0;
    repeat (10) @(negedge clk);
    check(got == 300, $sformatf("received %0d", got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
