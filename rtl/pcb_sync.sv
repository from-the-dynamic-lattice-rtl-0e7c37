// pcb_sync: synchronisation relay of one PCB's central FPGA.
//
// Each PCB carries four KDLL FPGAs and a fifth, central FPGA that manages
// them.  The central FPGAs of all boards are connected in series into a
// chain whose head is the CKDLL control unit.  Towards the tail run three
// command lines ("from CKDLL"); towards the head run five status lines
// ("up to CKDLL").  This block is the chain's per-board stage:
//   - the command is registered once and passed to the next board; the
//     copy for the four local FPGAs goes through LOC_DELAY further
//     registers.  Board p of an NPCB-board chain uses LOC_DELAY =
//     NPCB-1-p, so every FPGA of the machine acts on a command on the same
//     clock.  Without this a ball handed to a board that has not yet seen
//     a STEP would be moved twice by one STEP;
//   - the status of the four local FPGAs is merged with the status coming
//     from the boards further down and registered towards the head.
// Merging is OR for event and error lines and AND for the "all
// identifiers received" line (see mdll_pkg::up_merge).
//
// Latency: one clock per board in each direction, plus LOC_DELAY for the
// local command copy.  The register stages and
// the merge rules are this design's choices; the board-level jobs of the
// central FPGA (configuration over JTAG, fibre links) are not modelled.
module pcb_sync
  import mdll_pkg::*;
#(
  parameter int unsigned NFPGA     = 4,
  parameter int unsigned LOC_DELAY = 0   // extra clocks on the local command
) (
  input  logic clk,
  input  logic rst_n,
  input  cmd_e cmd_in,             // from the previous board (or CKDLL)
  output cmd_e cmd_out,            // to the next board
  output cmd_e cmd_loc,            // to the local KDLL FPGAs
  input  up_t  up_loc [NFPGA],     // status of the local KDLL FPGAs
  input  up_t  up_in,              // status from the next board
  output up_t  up_out              // status towards CKDLL
);

  up_t  merged;
  cmd_e loc_pipe [LOC_DELAY + 1];

  assign cmd_loc = loc_pipe[LOC_DELAY];

  always_comb begin
    merged = up_in;
    for (int f = 0; f < int'(NFPGA); f++) merged = up_merge(merged, up_loc[f]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_out <= CMD_NOP;
      up_out  <= UP_NEUTRAL;
      for (int i = 0; i <= int'(LOC_DELAY); i++) loc_pipe[i] <= CMD_NOP;
    end else begin
      cmd_out     <= cmd_in;
      up_out      <= merged;
      loc_pipe[0] <= cmd_in;
      for (int i = 1; i <= int'(LOC_DELAY); i++) loc_pipe[i] <= loc_pipe[i-1];
    end
  end

endmodule
