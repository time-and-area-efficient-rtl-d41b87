// input_buffer: the per-unit character buffer of a two-comparator KMP unit.
//
// A circular buffer of DEPTH slots (k/2 for a k-character pattern, as the
// document sizes it). One slot is written every clock, idle slots included,
// so the buffer doubles as the unit's fixed delay line: the slot being
// overwritten is registered onto out_beat/out_mvec and feeds the next unit
// of the row exactly DEPTH+1 clocks after it entered this one.
//
// The matcher owns the read pointer (rd_ptr, one wrap bit above the slot
// address). The buffer returns the two oldest unread slots asynchronously,
// rd0 = slot rd_ptr and rd1 = slot rd_ptr+1, for the two comparators, and
// count = number of written, unread slots (0..DEPTH). A slot written in
// clock t can be read in clocks t+1 .. t+DEPTH; if the matcher has not
// consumed it by then it is lost and 'overflow' pulses. The document proves
// this never happens for a k/2 buffer; the flag and the assertion check it.
//
// Each slot also carries the match vector that rides with a packet's last
// character. mark_en ORs mark_bits into slot mark_addr (the matcher uses it
// when it finishes a packet); a mark on the slot being evicted in the same
// clock is forwarded to the output. The match vector and the use of the
// buffer as the delay line are this design's choices.
module input_buffer
  import kmp_pkg::*;
#(
  parameter int unsigned DEPTH = 8,   // k/2 slots, power of two
  parameter int unsigned MW    = 8,   // width of the match vector
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side: one slot per clock
  input  beat_t         in_beat,
  input  logic [MW-1:0] in_mvec,
  // read side, driven by the matcher
  input  logic [AW:0]   rd_ptr,
  input  logic [1:0]    rd_consume,   // slots the matcher consumes this clock
  output beat_t         rd0,
  output beat_t         rd1,
  output logic [AW:0]   count,
  // match-vector update of a slot
  input  logic          mark_en,
  input  logic [AW-1:0] mark_addr,
  input  logic [MW-1:0] mark_bits,
  // delayed stream to the next unit
  output beat_t         out_beat,
  output logic [MW-1:0] out_mvec,
  output logic          overflow
);

  beat_t         mem_beat [DEPTH];
  logic [MW-1:0] mem_mvec [DEPTH];
  logic [AW:0]   wr_ptr;
  logic [AW-1:0] wr_addr, rd_addr0, rd_addr1;

  assign wr_addr  = wr_ptr[AW-1:0];
  assign rd_addr0 = rd_ptr[AW-1:0];
  assign rd_addr1 = rd_addr0 + AW'(1);

  assign rd0   = mem_beat[rd_addr0];
  assign rd1   = mem_beat[rd_addr1];
  assign count = wr_ptr - rd_ptr;

  // The slot overwritten this clock still holds an unread character when the
  // buffer is full and the matcher consumes nothing.
  assign overflow = (count == (AW+1)'(DEPTH)) && (rd_consume == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      out_beat <= '0;
      out_mvec <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_beat[i] <= '0;
        mem_mvec[i] <= '0;
      end
    end else begin
      out_beat <= mem_beat[wr_addr];
      out_mvec <= mem_mvec[wr_addr] |
                  ((mark_en && mark_addr == wr_addr) ? mark_bits : '0);
      if (mark_en && mark_addr != wr_addr)
        mem_mvec[mark_addr] <= mem_mvec[mark_addr] | mark_bits;
      mem_beat[wr_addr] <= in_beat;
      mem_mvec[wr_addr] <= in_mvec;
      wr_ptr <= wr_ptr + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("input_buffer: DEPTH must be a power of two, at least 2");
  end

  // The matcher never reads slots that have not been written.
  a_no_overread: assert property (@(posedge clk) disable iff (!rst_n)
    (AW+1)'(rd_consume) <= count);

endmodule
