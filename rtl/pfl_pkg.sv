// Shared types, constants and helpers of the partially-faulty-link (PFL) NoC.
//
// A network link is LINK_W parallel wires. One flit occupies the whole link:
// FLIT_W = LINK_W - 1 bits of flit content plus one even-parity bit on the top
// wire. When some wires are stuck, the sender rotates the flit left by one wire
// per cycle and sends it m+1 times, m being the longest run of faulty wires; the
// receiver rotates each copy back and keeps the bits that crossed good wires.
//
// The 40-wire link, 4x4 mesh and 6 VCs of 6 flits follow the evaluated system;
// the flit field layout and the parity code are this design's own choices.
package pfl_pkg;

  // ---- link and flit geometry -------------------------------------------
  localparam int unsigned LINK_W  = 40;           // wires per link
  localparam int unsigned FLIT_W  = LINK_W - 1;   // flit bits before coding
  localparam int unsigned SEG_W   = $clog2(LINK_W + 1); // holds 0..LINK_W
  localparam int unsigned VC_W    = 3;            // up to 8 virtual channels
  localparam int unsigned COORD_W = 2;            // 4x4 mesh coordinates
  localparam int unsigned PAY_W   = FLIT_W - 2 - VC_W - 2 * COORD_W;

  // ---- router ports (order of the router figure) -------------------------
  localparam int unsigned NPORT  = 5;
  localparam int unsigned P_XP   = 0;  // X+ (east)
  localparam int unsigned P_YP   = 1;  // Y+ (north)
  localparam int unsigned P_XM   = 2;  // X- (west)
  localparam int unsigned P_YM   = 3;  // Y- (south)
  localparam int unsigned P_LOC  = 4;  // injection / ejection

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_HEAD = 2'b01,
    FT_TAIL = 2'b10,
    FT_HT   = 2'b11   // single-flit packet: head and tail
  } flit_type_e;

  typedef struct packed {
    flit_type_e         ftype;
    logic [VC_W-1:0]    vc;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [PAY_W-1:0]   payload;
  } flit_t;

  typedef logic [LINK_W-1:0] link_word_t;

  // Forward wires of one directed link (sender -> receiver). Only `data`
  // crosses the possibly faulty wires; the control bits are assumed sound.
  typedef struct packed {
    logic       valid;   // a beat is on the wires this cycle
    logic       tv;      // the beat is a test vector (reconfiguration path)
    link_word_t data;
  } link_fwd_t;

  // Backward wires of one directed link (receiver -> sender), assumed sound.
  typedef struct packed {
    logic              nack;     // the flit ending this cycle was corrupted
    logic              m_valid;  // m_size below is new
    logic [SEG_W-1:0]  m_size;   // max continuous fault segment size
  } link_bwd_t;

endpackage
