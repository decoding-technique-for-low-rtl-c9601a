// Shared types and constants of the low-transition serial link.
//
// A data word of W bits travels from a sender to a receiver over one serial
// data line plus two additional lines, L1 and L2. L1/L2 tell the decoder in
// which window of the word the encoder moved bits around:
//   L1 L2 = 0 0  word sent as it is
//   L1 L2 = 1 0  window a_0..a_4
//   L1 L2 = 0 1  window a_3..a_7
//   L1 L2 = 1 1  window a_0..a_7
// Words are indexed [0:W-1] so that bit a_0 is the leftmost bit of a binary
// literal, the way the code tables write them (lint tools flag the
// ascending range; it is intended). The word width of 8 and the
// three windows follow the published decoding rule; the flit format (one
// serial bit plus the two L lines per cycle) is this design's choice.
package lp_pkg;

  localparam int unsigned W = 8;

  // Scan windows of the transition rule. A scan position j looks at bits
  // j, j+1 and j+2, and runs from START up to, not including, LIMIT.
  localparam int unsigned LO_START   = 0;
  localparam int unsigned LO_LIMIT   = 3;  // covers a_0..a_4
  localparam int unsigned HI_START   = 3;
  localparam int unsigned HI_LIMIT   = 6;  // covers a_3..a_7
  localparam int unsigned FULL_START = 0;
  localparam int unsigned FULL_LIMIT = 6;  // covers a_0..a_7

  typedef logic [0:W-1] word_t;

  // What the L1/L2 lines carry, as {l1, l2}.
  typedef enum logic [1:0] {
    MODE_NONE = 2'b00,
    MODE_HI   = 2'b01,
    MODE_LO   = 2'b10,
    MODE_FULL = 2'b11
  } mode_t;

  // One bit time on the link: the serial data bit and the two extra lines.
  typedef struct packed {
    logic d;
    logic l1;
    logic l2;
  } flit_t;

  // Number of transitions between neighbouring bits of a word.
  function automatic int unsigned transitions(word_t x);
    int unsigned n = 0;
    for (int i = 0; i < W - 1; i++) n += (x[i] != x[i+1]) ? 1 : 0;
    return n;
  endfunction

endpackage
