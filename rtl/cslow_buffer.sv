// cslow_buffer: input buffer shared by the two interleaved matchers of a
// C-slowed (pipelined) unit.
//
// Same circular structure as input_buffer (DEPTH slots, the evicted slot
// forms the delayed stream to the next unit), but a slot is written only on
// clocks with wr_en high, which in the pipelined unit is every second clock:
// the input rate per pattern equals one character per active comparison
// cycle. Two asynchronous read ports (slots rd_ptr and rd_ptr+1) serve
// whichever matcher is in its memory stage; the unit keeps one read pointer
// per matcher and derives each matcher's unread count from wr_ptr.
//
// mark_en ORs mark_bits into the match vector of slot mark_addr. On a
// write clock a mark on the slot being evicted is forwarded to the output,
// as in input_buffer. On a clock without a write, a mark on the slot of the
// most recent write refers to the character that write evicted (the matcher
// read it one clock before the write); the mark then goes into the output
// register, which still holds that character.
module cslow_buffer
  import kmp_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned MW    = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  beat_t         in_beat,
  input  logic [MW-1:0] in_mvec,
  output logic [AW:0]   wr_ptr,
  input  logic [AW:0]   rd_ptr,
  output beat_t         rd0,
  output beat_t         rd1,
  input  logic          mark_en,
  input  logic [AW-1:0] mark_addr,
  input  logic [MW-1:0] mark_bits,
  output beat_t         out_beat,
  output logic [MW-1:0] out_mvec
);

  beat_t         mem_beat [DEPTH];
  logic [MW-1:0] mem_mvec [DEPTH];
  logic [AW-1:0] wr_addr, last_addr, rd_addr0, rd_addr1;

  assign wr_addr   = wr_ptr[AW-1:0];
  assign last_addr = wr_addr - AW'(1);
  assign rd_addr0  = rd_ptr[AW-1:0];
  assign rd_addr1  = rd_addr0 + AW'(1);
  assign rd0       = mem_beat[rd_addr0];
  assign rd1       = mem_beat[rd_addr1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      out_beat <= '0;
      out_mvec <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        mem_beat[i] <= '0;
        mem_mvec[i] <= '0;
      end
    end else if (wr_en) begin
      out_beat <= mem_beat[wr_addr];
      out_mvec <= mem_mvec[wr_addr] |
                  ((mark_en && mark_addr == wr_addr) ? mark_bits : '0);
      if (mark_en && mark_addr != wr_addr)
        mem_mvec[mark_addr] <= mem_mvec[mark_addr] | mark_bits;
      mem_beat[wr_addr] <= in_beat;
      mem_mvec[wr_addr] <= in_mvec;
      wr_ptr <= wr_ptr + 1'b1;
    end else if (mark_en) begin
      if (mark_addr == last_addr)
        out_mvec <= out_mvec | mark_bits;
      else
        mem_mvec[mark_addr] <= mem_mvec[mark_addr] | mark_bits;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("cslow_buffer: DEPTH must be a power of two, at least 2");
  end

endmodule
