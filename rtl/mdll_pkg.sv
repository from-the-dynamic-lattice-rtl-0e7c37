// mdll_pkg: types and constants shared by the mDLL machine.
//
// The machine places KDLL operational cells on the nodes of a face-centred
// cubic (FCC) lattice.  The FCC lattice is kept as every second node of a
// reduced cubic lattice (RCL): a node (x,y,z) holds a cell when x+y+z is
// even.  Each cell then has 12 nearest neighbours, reached by the
// displacements (+-1,+-1,0), (+-1,0,+-1) and (0,+-1,+-1) in RCL units.
//
// Between FPGAs the 18 possible block-to-block directions (6 faces and
// 12 edges) are reduced to the 6 cubic directions, each one serial
// channel.  Edge traffic is carried in two hops, first along x, then y,
// then z.  The packet layout, the direction numbering and the command
// encoding of the synchronisation chain are this design's own choices.
package mdll_pkg;

  // ---------------------------------------------------------------- FCC
  localparam int unsigned NDIR = 12;   // FCC coordination number
  typedef logic [3:0] fcc_dir_t;       // 0..11

  // Displacement of FCC direction d, each component -1, 0 or +1.
  function automatic int dir_dx(input int d);
    case (d)
      0, 1, 4, 5: return 1;
      2, 3, 6, 7: return -1;
      default:    return 0;
    endcase
  endfunction

  function automatic int dir_dy(input int d);
    case (d)
      0, 2, 8, 9:    return 1;
      1, 3, 10, 11:  return -1;
      default:       return 0;
    endcase
  endfunction

  function automatic int dir_dz(input int d);
    case (d)
      4, 6, 8, 10:  return 1;
      5, 7, 9, 11:  return -1;
      default:      return 0;
    endcase
  endfunction

  // ------------------------------------------------------ cubic channels
  localparam int unsigned NCH = 6;
  typedef enum logic [2:0] {
    CH_XP = 3'd0, CH_XM = 3'd1,
    CH_YP = 3'd2, CH_YM = 3'd3,
    CH_ZP = 3'd4, CH_ZM = 3'd5
  } chan_e;

  // Channel pointing the other way (the one a packet arrives on).
  function automatic int chan_opp(input int c);
    return c ^ 1;
  endfunction

  // -------------------------------------------------------------- packets
  localparam int unsigned PKT_W = 20;  // bits per channel packet
  localparam int unsigned CW    = 4;   // width of one local coordinate field

  typedef enum logic [1:0] {
    PK_NONE = 2'd0,
    PK_BALL = 2'd1,   // test ball handed to a cell in another FPGA
    PK_ID   = 2'd2    // neighbour self-test identifier
  } pkt_type_e;

  // Ball packet: remaining FPGA hops in y and z (two's complement, -1..1)
  // and the target cell's local RCL coordinates in the receiving FPGA.
  typedef struct packed {
    logic [1:0]    rem_y;
    logic [1:0]    rem_z;
    logic [CW-1:0] tgt_a;
    logic [CW-1:0] tgt_b;
    logic [CW-1:0] tgt_c;
    logic [1:0]    pad;
  } ball_pl_t;   // 18 bits

  // Identifier packet: sender FPGA position and sending channel.
  typedef struct packed {
    logic [CW-1:0] px;
    logic [CW-1:0] py;
    logic [CW-1:0] pz;
    logic [2:0]    ch;
    logic [2:0]    pad;
  } id_pl_t;     // 18 bits

  typedef struct packed {
    pkt_type_e   typ;
    logic [17:0] pl;
  } pkt_t;       // PKT_W bits

  // ------------------------------------------------ synchronisation chain
  // 3 lines "from CKDLL" and 5 lines "up to CKDLL".
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,
    CMD_CLEAR  = 3'd1,  // reset visit counters, place the ball on the seed cell
    CMD_STEP   = 3'd2,  // the cell holding the ball hands it on
    CMD_IDTEST = 3'd3   // every FPGA sends its identifier on all 6 channels
  } cmd_e;

  typedef struct packed {
    logic landed;     // a cell received the ball this cycle      (OR)
    logic id_err;     // a wrong identifier was received          (OR)
    logic id_all;     // identifiers received on every channel    (AND)
    logic collision;  // a channel queue lost a packet            (OR)
    logic holding;    // some cell holds the ball                 (OR)
  } up_t;

  localparam up_t UP_NEUTRAL = '{landed: 1'b0, id_err: 1'b0, id_all: 1'b1,
                                 collision: 1'b0, holding: 1'b0};

  function automatic up_t up_merge(input up_t a, input up_t b);
    up_t r;
    r.landed    = a.landed    | b.landed;
    r.id_err    = a.id_err    | b.id_err;
    r.id_all    = a.id_all    & b.id_all;
    r.collision = a.collision | b.collision;
    r.holding   = a.holding   | b.holding;
    return r;
  endfunction

endpackage
