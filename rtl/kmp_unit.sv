// kmp_unit: one pattern matching unit of the linear array.
//
// Combines the k/2-slot input buffer, the k-entry pattern/jump memory and
// the two-comparator KMP matcher. The unit has three chain ports, as in the
// document's array: the packet stream (pkt_in -> pkt_out, delayed by
// DEPTH+1 clocks through the buffer), the match vector that rides on each
// packet's last character (mvec_in -> mvec_out; this unit ORs in bit
// UNIT_IDX when its pattern occurred in the packet) and the configuration
// chain (cfg_in -> cfg_out; the unit keeps the first K words after a
// 'first' word and forwards the rest one clock later).
//
// Per clock the unit accepts one stream slot. It reports every pattern
// occurrence on 'match', every finished packet on 'pkt_done'/'pkt_match',
// and flags 'overflow' if an unread character would leave the buffer,
// which the document proves cannot happen with a k/2 buffer. 'stall' and
// 'dual' expose when the matcher re-compares a character and when both
// comparators matched.
module kmp_unit
  import kmp_pkg::*;
#(
  parameter int unsigned K        = 16,
  parameter int unsigned DEPTH    = K / 2,
  parameter int unsigned MW       = 8,
  parameter int unsigned UNIT_IDX = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  beat_t         pkt_in,
  input  logic [MW-1:0] mvec_in,
  output beat_t         pkt_out,
  output logic [MW-1:0] mvec_out,
  input  cfg_word_t     cfg_in,
  output cfg_word_t     cfg_out,
  output logic          match,
  output logic          pkt_done,
  output logic          pkt_match,
  output logic          overflow,
  output logic          stall,
  output logic          dual,
  output logic          ready
);

  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  beat_t         rd0, rd1;
  logic [AW:0]   count, rd_ptr;
  logic [1:0]    rd_consume;
  logic          mark_en;
  logic [AW-1:0] mark_addr;
  logic [QW-1:0] qidx;
  pat_entry_t    pat0, pat1;
  logic [MW-1:0] my_bit;

  assign my_bit = MW'(1) << UNIT_IDX;

  input_buffer #(.DEPTH(DEPTH), .MW(MW)) u_buf (
    .clk, .rst_n,
    .in_beat   (pkt_in),
    .in_mvec   (mvec_in),
    .rd_ptr, .rd_consume, .rd0, .rd1, .count,
    .mark_en, .mark_addr,
    .mark_bits (my_bit),
    .out_beat  (pkt_out),
    .out_mvec  (mvec_out),
    .overflow
  );

  pattern_memory #(.K(K)) u_pat (
    .clk, .rst_n, .cfg_in, .cfg_out,
    .rd_idx (qidx),
    .pat0, .pat1, .ready
  );

  kmp_matcher #(.K(K), .DEPTH(DEPTH)) u_match (
    .clk, .rst_n,
    .rd0, .rd1, .count, .rd_ptr, .rd_consume,
    .qidx, .pat0, .pat1, .ready,
    .match, .pkt_done, .pkt_match, .mark_en, .mark_addr,
    .stall, .dual
  );

endmodule
