// ckdll_ctrl: CKDLL control unit of the machine.
//
// A separate FPGA coordinates the simultaneous work of all KDLL cells.  It
// sits at the head of the chain of PCB central FPGAs (pcb_sync): it drives
// the three command lines and reads the five merged status lines.  Two
// test sequences are built in, the ones used to verify the machine:
//
//   MODE_ID   neighbour self-test.  CLEAR, then IDTEST; every FPGA sends
//             its identifier on its 6 channels and checks what it
//             receives.  After ID_WAIT clocks the unit samples the status:
//             id_pass when every channel of every FPGA got the expected
//             identifier and none got a wrong one, id_fail otherwise.
//   MODE_BALL random-walk ("ball") test.  CLEAR puts the ball on the seed
//             cell (a run with no cell holding it ends at once as lost);
//             then STEP is issued, the unit waits for the "landed"
//             line, counts the step and issues the next STEP, n_steps
//             times.  If no landing is seen within STEP_TMO clocks the
//             ball is reported lost and the run ends.
//
// After CLEAR the unit waits CHAIN_LAT clocks so that the command has
// reached every board and the status has come back.  cycles counts the
// clocks of the run, so cycles/steps gives the time of one ball step.
// The command codes, wait times and time-out are this design's choices.
module ckdll_ctrl
  import mdll_pkg::*;
#(
  parameter int unsigned NPCB      = 27,               // boards in the chain
  parameter int unsigned CHAIN_LAT = 2 * NPCB + 8,     // round trip, clocks
  parameter int unsigned ID_WAIT   = CHAIN_LAT + 48,   // IDTEST settle time
  parameter int unsigned STEP_TMO  = 4 * CHAIN_LAT + 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        mode_id,     // 1: neighbour test, 0: ball test
  input  logic [31:0] n_steps,
  output cmd_e        cmd,
  input  up_t         up,
  output logic        busy,
  output logic        done,        // one clock at the end of a run
  output logic [31:0] steps,
  output logic [31:0] cycles,
  output logic        id_pass,
  output logic        id_fail,
  output logic        lost,
  output logic        collision
);

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_ID, S_STEP, S_DONE} state_e;

  localparam int unsigned TW = $clog2(STEP_TMO + ID_WAIT + CHAIN_LAT + 2);

  state_e        st;
  logic [TW-1:0] timer;
  logic          mode_q;
  logic [31:0]   target;

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cmd       <= CMD_NOP;
      timer     <= '0;
      mode_q    <= 1'b0;
      target    <= '0;
      done      <= 1'b0;
      steps     <= '0;
      cycles    <= '0;
      id_pass   <= 1'b0;
      id_fail   <= 1'b0;
      lost      <= 1'b0;
      collision <= 1'b0;
    end else begin
      cmd  <= CMD_NOP;
      done <= 1'b0;
      if (st != S_IDLE) cycles <= cycles + 1'b1;
      if (st != S_IDLE && up.collision) collision <= 1'b1;
      case (st)
        S_IDLE: if (start) begin
          cmd       <= CMD_CLEAR;
          timer     <= TW'(CHAIN_LAT);
          mode_q    <= mode_id;
          target    <= n_steps;
          steps     <= '0;
          cycles    <= '0;
          id_pass   <= 1'b0;
          id_fail   <= 1'b0;
          lost      <= 1'b0;
          collision <= 1'b0;
          st        <= S_CLR;
        end
        S_CLR: begin
          timer <= timer - 1'b1;
          if (timer == '0) begin
            if (mode_q) begin
              cmd   <= CMD_IDTEST;
              timer <= TW'(ID_WAIT);
              st    <= S_ID;
            end else if (!up.holding) begin
              lost <= 1'b1;        // no cell took the ball at CLEAR
              st   <= S_DONE;
            end else if (target == '0) begin
              st <= S_DONE;
            end else begin
              cmd   <= CMD_STEP;
              timer <= TW'(STEP_TMO);
              st    <= S_STEP;
            end
          end
        end
        S_ID: begin
          timer <= timer - 1'b1;
          if (timer == '0) begin
            id_pass <= up.id_all && !up.id_err;
            id_fail <= !(up.id_all && !up.id_err);
            st      <= S_DONE;
          end
        end
        S_STEP: begin
          timer <= timer - 1'b1;
          if (up.landed) begin
            steps <= steps + 1'b1;
            if (steps + 1'b1 == target) begin
              st <= S_DONE;
            end else begin
              cmd   <= CMD_STEP;
              timer <= TW'(STEP_TMO);
            end
          end else if (timer == '0) begin
            lost <= 1'b1;
            st   <= S_DONE;
          end
        end
        default: begin  // S_DONE
          done <= 1'b1;
          st   <= S_IDLE;
        end
      endcase
    end
  end

endmodule
