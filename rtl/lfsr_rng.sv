// lfsr_rng: pseudo-random number generator of one KDLL cell.
//
// Every KDLL cell carries its own generator.  The machine uses a 64-bit
// linear feedback shift register; a 128-bit one was found to give the same
// quality of random walk at about twice the logic, so 64 is the default.
// The register shifts left by one bit every clock; the new bit 0 is the XOR
// of the tap bits.  Tap positions are not fixed by the machine's
// description: the maximal-length taps of the common Xilinx table are used
// (64: 64,63,61,60; 128: 128,126,101,99; 32: 32,22,2,1; 16: 16,15,13,4),
// so the period is 2**WIDTH-1.
//
// Interface: load copies seed into the register (an all-zero seed, the one
// lock-up state, is replaced by 1); otherwise the register advances while
// en is high.  state is the register itself.  Reset loads 1.
module lfsr_rng #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  output logic [WIDTH-1:0] state
);

  initial begin
    assert (WIDTH == 16 || WIDTH == 32 || WIDTH == 64 || WIDTH == 128)
      else $error("lfsr_rng: no tap set for WIDTH=%0d", WIDTH);
  end

  // Tap mask: bit n-1 set for tap position n.
  function automatic logic [WIDTH-1:0] tap_mask();
    logic [WIDTH-1:0] m;
    m = '0;
    case (WIDTH)
      16:      begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3] = 1'b1; end
      32:      begin m[31] = 1'b1; m[21] = 1'b1; m[1] = 1'b1;  m[0] = 1'b1; end
      128:     begin m[WIDTH-1] = 1'b1; m[(WIDTH*125)/128] = 1'b1;
                     m[(WIDTH*100)/128] = 1'b1; m[(WIDTH*98)/128] = 1'b1; end
      default: begin m[WIDTH-1] = 1'b1; m[WIDTH-2] = 1'b1;
                     m[WIDTH-4] = 1'b1; m[WIDTH-5] = 1'b1; end
    endcase
    return m;
  endfunction

  localparam logic [WIDTH-1:0] TAPS = tap_mask();

  logic fb;
  assign fb = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= WIDTH'(1);
    else if (load)
      state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (en)
      state <= {state[WIDTH-2:0], fb};
  end

endmodule
