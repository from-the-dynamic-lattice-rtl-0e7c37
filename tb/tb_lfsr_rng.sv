// tb_lfsr_rng: self-checking test of the cell random generator.
//
// Checks the 64-bit register step by step against a model written from the
// tap list (64,63,61,60), that load replaces an all-zero seed by 1, that
// en=0 holds the state, and, on a 16-bit instance, that the period is the
// maximal 2**16-1.
module tb_lfsr_rng;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en, load;
  logic [63:0] seed, state, model;
  logic        en16;
  logic [15:0] state16, first16;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_rng #(.WIDTH(64)) dut (.clk, .rst_n, .en, .load, .seed, .state);
  lfsr_rng #(.WIDTH(16)) dut16 (.clk, .rst_n, .en(en16), .load(1'b0), .seed(16'h0),
                                .state(state16));

  function automatic logic [63:0] step64(input logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

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

  initial begin
    int period;
    en = 1'b0; load = 1'b0; seed = '0; en16 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == 64'd1, "reset value");
    // zero seed
    load = 1'b1; seed = '0;
    @(negedge clk);
    check(state == 64'd1, "zero seed replaced by 1");
    seed = 64'hDEAD_BEEF_0123_4567;
    @(negedge clk);
    check(state == seed, "seed loaded");
    load = 1'b0;
    model = seed;
    en = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      model = step64(model);
      check(state == model, $sformatf("step %0d", i));
    end
    en = 1'b0;
    repeat (5) @(negedge clk);
    check(state == model, "hold with en low");
    // period of the 16-bit register
    first16 = state16;
    en16 = 1'b1;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (state16 != first16 && period < 70000);
    check(period == 65535, $sformatf("16-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
