// mdll_top: the mDLL machine, a scalable array of KDLL FPGAs on a 3-D torus.
//
// The machine simulates liquids with the Dynamic Lattice Liquid method on
// an FCC lattice of KDLL operational cells.  The lattice is cut into
// identical blocks of ALPHA x BETA x ETA reduced-cubic nodes, one per KDLL
// FPGA (kdll_fpga, 32 cells each for 4x4x4).  The blocks form a torus of
// FX x FY x FZ = 2M x 2N x DELTA FPGAs; each talks to its 6 face
// neighbours over serial channels, and traffic towards edge neighbours is
// relayed.
//
// Physical layout: DELTA vertical panels (z), each with N rows x M columns
// of PCBs; every PCB carries 4 KDLL FPGAs and one central FPGA.  To keep
// every torus link short ("leap frog" folding), the PCB in column i and row
// j (1-based) carries the blocks at torus positions
//   s=1: (i, j)   s=2: (2M+1-i, j)   s=3: (i, 2N+1-j)   s=4: (2M+1-i, 2N+1-j)
// so the wrap-around link of each ring joins neighbouring boards.  In the
// logic only the grouping of FPGAs on boards (for the synchronisation
// chain) depends on this; the channel wiring follows torus positions.
// Folding is applied in x and y, within a panel; z is a plain ring.
//
// Control: ckdll_ctrl heads a chain of the boards' pcb_sync stages in
// board order p = ((k-1)*N + (j-1))*M + (i-1).  Each stage delays its
// local copy of a command so that all FPGAs act on it on the same clock,
// NPCB clocks after the control unit issues it.  Runs are started with
// start/mode_id/n_steps (neighbour self-test or ball test); the ball
// starts on cell seed_cell of FPGA seed_fpga.  Results are read through
// rd_fpga/rd_cell -> rd_visits (combinational); FPGA number
// f = (z*FY + y)*FX + x in torus positions, 0-based.
// ev_local/ev_send/ev_relay pulse for in-block hand-offs, packets sent
// between blocks, and packets relayed on a second hop.
//
// Defaults are the built machine: 3 panels of 3x3 boards, 108 FPGAs,
// 3456 cells.  Clock and reset are common to all FPGAs here.
module mdll_top
  import mdll_pkg::*;
#(
  parameter int unsigned ALPHA = 4,
  parameter int unsigned BETA  = 4,
  parameter int unsigned ETA   = 4,
  parameter int unsigned M     = 3,   // PCB columns per panel
  parameter int unsigned N     = 3,   // PCB rows per panel
  parameter int unsigned DELTA = 3,   // panels
  parameter int unsigned LANES = 4,
  parameter int unsigned VW    = 32,
  parameter int unsigned RNG_W = 64,
  localparam int unsigned FX   = 2 * M,
  localparam int unsigned FY   = 2 * N,
  localparam int unsigned FZ   = DELTA,
  localparam int unsigned NF   = FX * FY * FZ,
  localparam int unsigned NPCB = M * N * DELTA,
  localparam int unsigned NC   = ALPHA * BETA * ETA / 2,
  localparam int unsigned CIW  = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned FIW  = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           mode_id,
  input  logic [31:0]    n_steps,
  input  logic [FIW-1:0] seed_fpga,
  input  logic [CIW-1:0] seed_cell,
  output logic           busy,
  output logic           done,
  output logic [31:0]    steps,
  output logic [31:0]    cycles,
  output logic           id_pass,
  output logic           id_fail,
  output logic           lost,
  output logic           collision,
  input  logic [FIW-1:0] rd_fpga,
  input  logic [CIW-1:0] rd_cell,
  output logic [VW-1:0]  rd_visits,
  output logic           ev_local,
  output logic           ev_send,
  output logic           ev_relay
);

  initial begin
    assert (FX <= 16 && FY <= 16 && FZ <= 16)
      else $error("mdll_top: torus too large for the identifier fields");
  end

  function automatic int fidx(input int x, input int y, input int z);
    return (z * int'(FY) + y) * int'(FX) + x;
  endfunction

  // Board p and slot s (0..3) of the FPGA at torus position (x,y,z).
  function automatic int board_of(input int x, input int y, input int z);
    int i, j;
    i = (x < int'(M)) ? x : int'(2 * M) - 1 - x;
    j = (y < int'(N)) ? y : int'(2 * N) - 1 - y;
    return (z * int'(N) + j) * int'(M) + i;
  endfunction
  function automatic int slot_of(input int x, input int y);
    return ((x < int'(M)) ? 0 : 1) + ((y < int'(N)) ? 0 : 2);
  endfunction

  // --------------------------------------------------------- the FPGAs
  logic             tx_frame [NF][NCH];
  logic [LANES-1:0] tx_lanes [NF][NCH];
  up_t              f_up     [NF];
  cmd_e             b_cmd    [NPCB];
  logic [VW-1:0]    f_visits [NF];
  logic [NF-1:0]    f_loc, f_snd, f_rly;

  for (genvar z = 0; z < int'(FZ); z++) begin : g_z
    for (genvar y = 0; y < int'(FY); y++) begin : g_y
      for (genvar x = 0; x < int'(FX); x++) begin : g_x
        localparam int F = fidx(x, y, z);
        logic             rx_frame [NCH];
        logic [LANES-1:0] rx_lanes [NCH];

        // Channel ch receives what the neighbour in direction ch sends on
        // the opposite channel.
        assign rx_frame[CH_XP] = tx_frame[fidx((x + 1) % FX, y, z)][CH_XM];
        assign rx_lanes[CH_XP] = tx_lanes[fidx((x + 1) % FX, y, z)][CH_XM];
        assign rx_frame[CH_XM] = tx_frame[fidx((x + FX - 1) % FX, y, z)][CH_XP];
        assign rx_lanes[CH_XM] = tx_lanes[fidx((x + FX - 1) % FX, y, z)][CH_XP];
        assign rx_frame[CH_YP] = tx_frame[fidx(x, (y + 1) % FY, z)][CH_YM];
        assign rx_lanes[CH_YP] = tx_lanes[fidx(x, (y + 1) % FY, z)][CH_YM];
        assign rx_frame[CH_YM] = tx_frame[fidx(x, (y + FY - 1) % FY, z)][CH_YP];
        assign rx_lanes[CH_YM] = tx_lanes[fidx(x, (y + FY - 1) % FY, z)][CH_YP];
        assign rx_frame[CH_ZP] = tx_frame[fidx(x, y, (z + 1) % FZ)][CH_ZM];
        assign rx_lanes[CH_ZP] = tx_lanes[fidx(x, y, (z + 1) % FZ)][CH_ZM];
        assign rx_frame[CH_ZM] = tx_frame[fidx(x, y, (z + FZ - 1) % FZ)][CH_ZP];
        assign rx_lanes[CH_ZM] = tx_lanes[fidx(x, y, (z + FZ - 1) % FZ)][CH_ZP];

        kdll_fpga #(
          .ALPHA(ALPHA), .BETA(BETA), .ETA(ETA),
          .FX(FX), .FY(FY), .FZ(FZ),
          .LANES(LANES), .VW(VW), .RNG_W(RNG_W)
        ) u_fpga (
          .clk       (clk),
          .rst_n     (rst_n),
          .pos_x     (CW'(x)),
          .pos_y     (CW'(y)),
          .pos_z     (CW'(z)),
          .cmd       (b_cmd[board_of(x, y, z)]),
          .seed_here (seed_fpga == FIW'(F)),
          .seed_cell (seed_cell),
          .tx_frame  (tx_frame[F]),
          .tx_lanes  (tx_lanes[F]),
          .rx_frame  (rx_frame),
          .rx_lanes  (rx_lanes),
          .up        (f_up[F]),
          .ev_local  (f_loc[F]),
          .ev_send   (f_snd[F]),
          .ev_relay  (f_rly[F]),
          .rd_cell   (rd_cell),
          .rd_visits (f_visits[F])
        );
      end
    end
  end

  assign rd_visits = f_visits[rd_fpga];
  assign ev_local  = |f_loc;
  assign ev_send   = |f_snd;
  assign ev_relay  = |f_rly;

  // ------------------------------------------------ synchronisation chain
  cmd_e ctl_cmd;
  cmd_e chain_cmd [NPCB + 1];
  up_t  chain_up  [NPCB + 1];
  up_t  board_up  [NPCB][4];

  assign chain_cmd[0]  = ctl_cmd;
  assign chain_up[NPCB] = UP_NEUTRAL;

  for (genvar z = 0; z < int'(FZ); z++) begin : g_bz
    for (genvar y = 0; y < int'(FY); y++) begin : g_by
      for (genvar x = 0; x < int'(FX); x++) begin : g_bx
        assign board_up[board_of(x, y, z)][slot_of(x, y)] = f_up[fidx(x, y, z)];
      end
    end
  end

  for (genvar p = 0; p < int'(NPCB); p++) begin : g_pcb
    pcb_sync #(.NFPGA(4), .LOC_DELAY(NPCB - 1 - p)) u_sync (
      .clk     (clk),
      .rst_n   (rst_n),
      .cmd_in  (chain_cmd[p]),
      .cmd_out (chain_cmd[p + 1]),
      .cmd_loc (b_cmd[p]),
      .up_loc  (board_up[p]),
      .up_in   (chain_up[p + 1]),
      .up_out  (chain_up[p])
    );
  end

  ckdll_ctrl #(.NPCB(NPCB)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mode_id   (mode_id),
    .n_steps   (n_steps),
    .cmd       (ctl_cmd),
    .up        (chain_up[0]),
    .busy      (busy),
    .done      (done),
    .steps     (steps),
    .cycles    (cycles),
    .id_pass   (id_pass),
    .id_fail   (id_fail),
    .lost      (lost),
    .collision (collision)
  );

endmodule
