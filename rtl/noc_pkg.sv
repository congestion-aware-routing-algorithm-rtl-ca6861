// noc_pkg: types and constants shared by the congestion-aware mesh NoC.
//
// A flit is 64 bits and is routed on its own: every flit carries the source
// and destination addresses, a congestion byte, 32 bits of payload and a tail
// byte. Bit 0 is the first bit of byte 1, as in the flit layout of the design:
//
//   [7:0]   source address      ([3:0] x, [7:4] y)
//   [15:8]  destination address ([11:8] x, [15:12] y)
//   [23:16] congestion byte     ([19:16] delay information of the sending
//                                router, [23:20] congestion status of its
//                                four neighbours, bit 20 N, 21 E, 22 W, 23 S)
//   [55:24] payload (4 bytes)
//   [63:56] tail                ([62:56] sequence number, [63] last flit)
//
// Routers exchange flits over 8-bit channels, one byte per clock, byte 1
// (bits [7:0]) first. The address nibble order inside a byte, the order of
// the status bits and the byte order on the channel are this design's
// choice. North is +y, east is +x.
package noc_pkg;

  parameter int unsigned FLIT_W    = 64;   // flit size, bits
  parameter int unsigned CH_W      = 8;    // channel width, bits
  parameter int unsigned FLIT_BYTES = FLIT_W / CH_W;
  parameter int unsigned COORD_W   = 4;    // one address nibble per axis
  parameter int unsigned NPORTS    = 5;    // N, E, W, S, local
  parameter int unsigned NDIRS     = 4;    // neighbour ports only
  parameter int unsigned INFO_W    = 4;    // delay information field
  parameter int unsigned CNT_W     = 8;    // per-flit delay counters (saturating)

  // A router counts as congested when its delay information, read as a
  // fraction of the largest 4-bit value, exceeds 70 percent.
  parameter int unsigned CONG_PERCENT = 70;

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_W = 3'd2,
    DIR_S = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // Which rule of the routing decision chose the output port.
  typedef enum logic [2:0] {
    RC_LOCAL        = 3'd0,   // flit has arrived
    RC_SINGLE       = 3'd1,   // only one productive direction
    RC_FREE_DELAY   = 3'd2,   // both neighbours free: lower delay info
    RC_ONE_CONG     = 3'd3,   // one neighbour congested: take the other
    RC_ND_DELAY     = 3'd4,   // both congested, next-door alike: lower delay
    RC_ND_FREE      = 3'd5    // both congested: free next-door neighbour
  } rc_case_e;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t y;
    coord_t x;
  } addr_t;

  typedef struct packed {
    logic [NDIRS-1:0]  nbr_status;   // 1 = that neighbour is congested
    logic [INFO_W-1:0] delay_info;   // averaged total delay, 0..15
  } cong_t;

  typedef struct packed {
    logic        last;               // last flit of the packet
    logic [6:0]  seq;                // flit sequence number
    logic [31:0] data;               // payload
    cong_t       cong;
    addr_t       dst;
    addr_t       src;
  } flit_t;

  // One row of the congestion information table (CITb).
  typedef cong_t cit_entry_t;

  // Byte-wide channel, forward direction; the ready bit runs the other way.
  typedef struct packed {
    logic            valid;
    logic [CH_W-1:0] data;
  } link_t;

  // Per-flit delay bookkeeping carried through the router with the flit.
  typedef struct packed {
    logic [CNT_W-1:0] pd;            // propagation cycles (moving)
    logic [CNT_W-1:0] qd;            // queuing cycles (waiting)
  } delay_t;

  function automatic logic is_congested(logic [INFO_W-1:0] info);
    return (int'(info) * 100) > (int'(CONG_PERCENT) * ((1 << INFO_W) - 1));
  endfunction

  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      default: return DIR_L;
    endcase
  endfunction

  function automatic logic [CNT_W-1:0] sat_inc(logic [CNT_W-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

endpackage
