// kmp_pkg: types and constants shared by the two-comparator KMP string
// matching units.
//
// A packet travels through a row of matching units as a stream of
// character beats, one beat per clock (a beat may be an idle slot between
// packets). The beat of a packet's last character also carries the match
// vector: one bit per unit of the row, set by every unit whose pattern
// occurred in that packet. Patterns are loaded over a 16-bit configuration
// path, one {character, jump} word per clock, daisy-chained from unit to
// unit. The 8-bit characters and the 16-bit configuration word follow the
// document; the beat framing and match vector are this design's choices.
package kmp_pkg;

  localparam int unsigned CHAR_W = 8;   // input characters are bytes
  localparam int unsigned JUMP_W = 8;   // jump field of a configuration word

  typedef logic [CHAR_W-1:0] char_t;
  typedef logic [JUMP_W-1:0] jump_t;

  // One entry of the pattern memory: the pattern character P[q] and the
  // KMP jump value next[q] (0 = advance the input and restart at P[1]).
  typedef struct packed {
    char_t ch;
    jump_t jump;
  } pat_entry_t;

  // One slot of the character stream. valid = 0 is an idle slot; last
  // marks the final character of a packet.
  typedef struct packed {
    logic  valid;
    logic  last;
    char_t ch;
  } beat_t;

  // A word on the configuration chain: 1 + 1 + 16 bits, the 16-bit
  // pattern data path carrying {character, jump}. 'first' marks the first word of a
  // unit's pattern; each unit keeps the first K words it receives after it
  // and forwards the rest.
  typedef struct packed {
    logic       valid;
    logic       first;
    pat_entry_t data;
  } cfg_word_t;

endpackage
