// iff_pkg: constants shared by the IFF reply decoder-degarbler.
//
// A Mode A/C transponder reply is two framing pulses F1 and F2, 20.3 us
// apart, with up to 13 information pulses on a 1.45 us grid between them
// (C1 A1 C2 A2 C4 A4 X B1 D1 B2 D2 B4 D4). The design runs at 50 MHz and
// represents one 1.45 us slot by 72 shift-register stages (1.44 us), so one
// frame is 14 slots = 1008 clocks. The decode and garble-clear sub-zones are
// two clocks each (40 ns). These numbers follow the reply format and the
// clocking of the degarbler; the code type below is this design's own.
package iff_pkg;

  localparam int unsigned STAGES_PER_SLOT = 72;  // clocks per 1.45 us slot
  localparam int unsigned SLOTS_PER_FRAME = 14;  // F1 to F2 in slots
  localparam int unsigned NUM_INFO        = 13;  // information pulse positions
  localparam int unsigned DECODE_ZONE     = 2;   // clocks of bracket decode required
  localparam int unsigned CLEAR_ZONE      = 2;   // garble-free clocks on each side

  // Decoded reply, bit 12 = first information pulse received (C1).
  typedef struct packed {
    logic c1, a1, c2, a2, c4, a4, x, b1, d1, b2, d2, b4, d4;
  } iff_code_t;

endpackage
