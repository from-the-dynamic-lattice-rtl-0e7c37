// kdll_cell: one KDLL operational cell on an FCC node.
//
// The cell owns a 64-bit LFSR random generator (lfsr_rng) and a visit
// counter, and runs the machine's "ball" test: a virtual ball wanders at
// random between nearest FCC neighbours, and every cell counts how often the
// ball arrived.  An even spread of visits over all cells shows that every
// link of the lattice works and that the generators are good.
//
// The Dynamic Lattice Liquid algorithm that the cells run in production is
// defined elsewhere and not reproduced here; this cell implements the
// generator and the neighbour hand-off that the test exercises.
//
// Behaviour (one clock domain, all outputs registered):
//   cmd = CMD_CLEAR : visit counter <= seed_cell (the seed cell starts with
//                     one visit), holding <= seed_cell, generator <= rng_seed.
//   ball_in         : holding <= 1, counter + 1 (saturating), landed pulses
//                     on the next clock.
//   cmd = CMD_STEP  : if holding, the cell drops the ball and for one clock
//                     raises ball_out with ball_dir, one of the 12 FCC
//                     directions, drawn as (r[15:0]*12)>>16 from the
//                     generator state r.  The enclosing FPGA routes it.
// The direction encoding and the draw are this design's choices.
module kdll_cell
  import mdll_pkg::*;
#(
  parameter int unsigned VW    = 32,  // visit counter width
  parameter int unsigned RNG_W = 64   // LFSR length
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cmd_e              cmd,
  input  logic              seed_cell,
  input  logic [RNG_W-1:0]  rng_seed,
  input  logic              ball_in,
  output logic              ball_out,
  output fcc_dir_t          ball_dir,
  output logic              holding,
  output logic              landed,
  output logic [VW-1:0]     visits
);

  logic [RNG_W-1:0] rng;
  logic             clear;

  assign clear = (cmd == CMD_CLEAR);

  lfsr_rng #(.WIDTH(RNG_W)) u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .load  (clear),
    .seed  (rng_seed),
    .state (rng)
  );

  // Uniform choice among 12 directions from 16 random bits.
  logic [19:0] scaled;
  assign scaled = 20'(rng[15:0]) * 20'd12;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      visits   <= '0;
      holding  <= 1'b0;
      ball_out <= 1'b0;
      ball_dir <= '0;
      landed   <= 1'b0;
    end else begin
      ball_out <= 1'b0;
      landed   <= 1'b0;
      if (clear) begin
        visits  <= VW'(seed_cell);
        holding <= seed_cell;
      end else begin
        if (cmd == CMD_STEP && holding) begin
          ball_out <= 1'b1;
          ball_dir <= fcc_dir_t'(scaled[19:16]);
          holding  <= 1'b0;
        end
        if (ball_in) begin
          holding <= 1'b1;
          landed  <= 1'b1;
          if (visits != '1) visits <= visits + 1'b1;
        end
      end
    end
  end

endmodule
