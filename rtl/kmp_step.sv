// kmp_step: the combinational heart of a two-comparator KMP matcher: the two
// comparators, the address generation and the index multiplexers of one
// comparison cycle.
//
// Given the two oldest unread stream slots (rd0 = T[j], rd1 = T[j+1]), how
// many of them are present (have0, have1), the pattern entries at the
// current index (pat0 = {P[q], next[q]}, pat1 = {P[q+1], next[q+1]}) and the
// matcher state (qidx = q-1, in_pkt, seen), it returns the next state and
// how many slots to consume, following the update table
//
//   C1 C2 | pattern index | input index
//   0  x  | next[q]       | +0  (+1 and q = 1 when next[q] = 0)
//   1  0  | next[q+1]     | +1  (+2 and q = 1 when next[q+1] = 0)
//   1  1  | q + 2         | +2
//
// C2 takes part only when T[j+1] is present, belongs to the same packet and
// q < K; otherwise C1 alone advances q and j by one. Matching P[K] reports
// 'match' and restarts at P[1] with the next character. Consuming a
// packet's last character (last_consumed; last_second says it was T[j+1])
// returns q to 1. Idle slots are skipped, two at a time. A packet's first
// character waits while 'ready' is low. The table is the document's; the
// treatment of next = 0, packet ends, idle slots and the restart after a
// match are this design's reading of it.
module kmp_step
  import kmp_pkg::*;
#(
  parameter int unsigned K = 16,
  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          have0,
  input  logic          have1,
  input  beat_t         rd0,
  input  beat_t         rd1,
  input  pat_entry_t    pat0,
  input  pat_entry_t    pat1,
  input  logic          ready,
  input  logic [QW-1:0] qidx,
  input  logic          in_pkt,
  input  logic          seen,
  output logic [QW-1:0] qidx_nx,
  output logic [1:0]    consume,
  output logic          in_pkt_nx,
  output logic          seen_nx,
  output logic          match,
  output logic          last_consumed,
  output logic          last_second,
  output logic          stall,
  output logic          dual
);

  logic c1, c2, use2;

  always_comb begin
    qidx_nx       = qidx;
    consume       = 2'd0;
    in_pkt_nx     = in_pkt;
    seen_nx       = seen;
    match         = 1'b0;
    last_consumed = 1'b0;
    last_second   = 1'b0;
    stall         = 1'b0;
    dual          = 1'b0;
    use2          = have1 && rd1.valid && !rd0.last && (qidx != QW'(K - 1));
    c1            = (rd0.ch == pat0.ch);
    c2            = use2 && (rd1.ch == pat1.ch);

    if (!have0) begin
      // nothing buffered
    end else if (!rd0.valid) begin
      // idle slot between packets: skip it, and the next one if also idle
      consume = (have1 && !rd1.valid) ? 2'd2 : 2'd1;
    end else if (!in_pkt && !ready) begin
      // first character of a packet waits for the pattern reload
    end else if (!c1) begin
      if (pat0.jump == '0) begin
        qidx_nx       = '0;
        consume       = 2'd1;
        last_consumed = rd0.last;
      end else begin
        qidx_nx = QW'(pat0.jump - 1'b1);
        stall   = 1'b1;
      end
    end else if (qidx == QW'(K - 1)) begin
      // P[K] matched by C1
      match         = 1'b1;
      qidx_nx       = '0;
      consume       = 2'd1;
      last_consumed = rd0.last;
    end else if (!use2) begin
      qidx_nx       = qidx + 1'b1;
      consume       = 2'd1;
      last_consumed = rd0.last;
    end else if (!c2) begin
      if (pat1.jump == '0) begin
        qidx_nx       = '0;
        consume       = 2'd2;
        last_consumed = rd1.last;
        last_second   = 1'b1;
      end else begin
        qidx_nx = QW'(pat1.jump - 1'b1);
        consume = 2'd1;
      end
    end else begin
      dual          = 1'b1;
      consume       = 2'd2;
      last_consumed = rd1.last;
      last_second   = 1'b1;
      if (qidx == QW'(K - 2)) begin
        // P[K] matched by C2
        match   = 1'b1;
        qidx_nx = '0;
      end else begin
        qidx_nx = qidx + QW'(2);
      end
    end

    if (consume != 2'd0 && rd0.valid) begin
      in_pkt_nx = 1'b1;
      seen_nx   = seen | match;
    end
    if (last_consumed) begin
      in_pkt_nx = 1'b0;
      seen_nx   = 1'b0;
      qidx_nx   = '0;
    end
  end

endmodule
