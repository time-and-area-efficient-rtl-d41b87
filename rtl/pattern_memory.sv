// pattern_memory: pattern characters and KMP jump values of one unit.
//
// K entries of {character P[q], jump next[q]}, q = 1..K, stored at address
// q-1. Loading follows the document's daisy chain: words arrive one per
// clock on cfg_in; a word flagged 'first' restarts the fill at entry 0, the
// following words fill entries 1..K-1, and once the memory is full every
// further word is passed on (one clock later) on cfg_out, its first word
// flagged 'first' for the next unit. A row of p units therefore loads in
// p*K clocks from one 16-bit stream.
//
// Two asynchronous read ports serve the two comparators: pat0 = entry rd_idx
// (P[q]) and pat1 = entry rd_idx+1 (P[q+1], undefined when rd_idx = K-1).
// 'ready' is high while all K entries hold the current pattern; it drops
// from the 'first' word until the K-th word of a reload. The jump table is
// computed off-chip, as in the document; the 'first' flag and the ready
// signal are this design's choices.
module pattern_memory
  import kmp_pkg::*;
#(
  parameter int unsigned K = 16,
  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_word_t  cfg_in,
  output cfg_word_t  cfg_out,
  input  logic [QW-1:0] rd_idx,
  output pat_entry_t pat0,
  output pat_entry_t pat1,
  output logic       ready
);

  pat_entry_t     mem [K];
  logic [QW:0]    fill;        // entries loaded since the last 'first' word
  logic           fwd_started; // a word has been forwarded since then
  logic [QW-1:0]  rd_idx1;

  assign rd_idx1 = (rd_idx == QW'(K - 1)) ? rd_idx : rd_idx + QW'(1);
  assign pat0    = mem[rd_idx];
  assign pat1    = mem[rd_idx1];
  assign ready   = (fill == (QW+1)'(K));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill        <= '0;
      fwd_started <= 1'b0;
      cfg_out     <= '0;
    end else begin
      cfg_out <= '0;
      if (cfg_in.valid) begin
        if (cfg_in.first) begin
          mem[0]      <= cfg_in.data;
          fill        <= (QW+1)'(1);
          fwd_started <= 1'b0;
        end else if (fill < (QW+1)'(K)) begin
          mem[fill[QW-1:0]] <= cfg_in.data;
          fill              <= fill + 1'b1;
        end else begin
          cfg_out.valid <= 1'b1;
          cfg_out.first <= !fwd_started;
          cfg_out.data  <= cfg_in.data;
          fwd_started   <= 1'b1;
        end
      end
    end
  end

endmodule
