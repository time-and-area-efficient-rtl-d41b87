// kmp_matcher: two-comparator Knuth-Morris-Pratt control of one unit.
//
// Holds the pattern index q (stored as q-1 in 'qidx') and the input buffer
// index j (rd_ptr); the comparison logic itself is kmp_step. Each clock it
// compares the two oldest unread characters
// T[j], T[j+1] against P[q], P[q+1] with two comparators C1 and C2 and
// updates both indices, following the document's table:
//
//   C1 C2 | pattern index | input index
//   0  x  | next[q]       | +0  (+1 and q = 1 when next[q] = 0)
//   1  0  | next[q+1]     | +1  (+2 and q = 1 when next[q+1] = 0)
//   1  1  | q + 2         | +2
//
// next[] is the precomputed KMP jump table (0 means no prefix can match:
// the character is dropped and matching restarts at P[1]). C2 is used only
// when T[j+1] is already in the buffer, belongs to the same packet and
// q < K; otherwise C1 alone advances q and j by one. A match is reported
// when P[K] compares equal; matching then restarts at P[1] with the next
// character, so occurrences are counted without overlap. At a packet's
// last character the index returns to P[1], 'pkt_done' pulses and the
// packet's result (pkt_match) is ORed into that character's buffer slot
// through mark_*. Idle slots are skipped, two per clock. A packet does not
// start while the pattern memory is reloading (ready low).
//
// Everything runs in one clock: asynchronous buffer and pattern reads,
// comparisons and the index multiplexers, as in the document's unpipelined
// unit. Packet framing, idle-slot handling, the restart after a match and
// the ready interlock are this design's choices.
module kmp_matcher
  import kmp_pkg::*;
#(
  parameter int unsigned K     = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // input buffer
  input  beat_t         rd0,
  input  beat_t         rd1,
  input  logic [AW:0]   count,
  output logic [AW:0]   rd_ptr,
  output logic [1:0]    rd_consume,
  // pattern memory
  output logic [QW-1:0] qidx,
  input  pat_entry_t    pat0,
  input  pat_entry_t    pat1,
  input  logic          ready,
  // results
  output logic          match,       // P[1..K] found ending at a consumed character
  output logic          pkt_done,    // a packet's last character was consumed
  output logic          pkt_match,   // with pkt_done: the packet held the pattern
  output logic          mark_en,
  output logic [AW-1:0] mark_addr,
  output logic          stall,       // a character is compared again (no input advance)
  output logic          dual         // both comparators matched
);

  logic          in_pkt;      // inside a packet (a character consumed, not the last)
  logic          seen;        // the pattern occurred earlier in this packet
  logic          have0, have1;
  logic [QW-1:0] qidx_nx;
  logic          in_pkt_nx, seen_nx, last_consumed, last_second;
  logic [AW-1:0] last_addr;

  assign have0 = (count != '0);
  assign have1 = (count > (AW+1)'(1));

  kmp_step #(.K(K)) u_step (
    .have0, .have1, .rd0, .rd1, .pat0, .pat1, .ready,
    .qidx, .in_pkt, .seen,
    .qidx_nx,
    .consume (rd_consume),
    .in_pkt_nx, .seen_nx, .match, .last_consumed, .last_second,
    .stall, .dual
  );

  assign last_addr = rd_ptr[AW-1:0] + (last_second ? AW'(1) : AW'(0));
  assign pkt_done  = last_consumed;
  assign pkt_match = seen | match;
  assign mark_en   = last_consumed && (seen | match);
  assign mark_addr = last_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qidx   <= '0;
      rd_ptr <= '0;
      in_pkt <= 1'b0;
      seen   <= 1'b0;
    end else begin
      qidx   <= qidx_nx;
      rd_ptr <= rd_ptr + (AW+1)'(rd_consume);
      in_pkt <= in_pkt_nx;
      seen   <= seen_nx;
    end
  end

  // The index never leaves the pattern and a jump only moves backwards.
  a_q_range: assert property (@(posedge clk) disable iff (!rst_n) (QW+1)'(qidx) < (QW+1)'(K));
  a_jump_back: assert property (@(posedge clk) disable iff (!rst_n)
    (have0 && rd0.valid && stall) |-> (pat0.jump <= {{(JUMP_W-QW){1'b0}}, qidx}));

endmodule
