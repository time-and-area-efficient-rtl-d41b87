// kmp_cslow_unit: pipelined (C-slowed) matching unit that checks one packet
// stream against two patterns with one set of comparison hardware.
//
// The unpipelined unit spends most of its clock in the memory read and the
// comparisons, and the rest in the index multiplexers. Here a register cut
// splits the cycle into a memory stage (S1: read the buffer at the matcher's
// read pointer and its pattern memory at its pattern index) and a compare
// stage (S2: the two comparators and the index update of kmp_step). Two
// matcher contexts, 0 and 1, each with its own pattern memory, pattern
// index, read pointer and packet state, alternate through the stages: on
// clocks with phase = 0 context 0 is in S1 and context 1 in S2, on
// phase = 1 the other way round. Each context therefore gets one complete
// comparison cycle every two clocks, and the stream advances at the same
// rate: a slot is written on every clock with phase = 1 (the source holds
// each slot for two clocks, or presents it while phase = 1). The buffer,
// the comparators and the update logic are shared; only the state and the
// pattern memories are doubled, as in the document.
//
// Chain ports match kmp_unit: pkt_out is the stream delayed by DEPTH slots
// (it changes on clocks following phase = 1), mvec_out carries the match
// vector (bit BIT0 for pattern 0, BIT1 for pattern 1) on each last
// character, and the configuration chain fills pattern memory 0 then
// pattern memory 1 (2K words) before forwarding. Per-context events come out
// as 2-bit vectors. 'overflow' flags a character lost by either context.
// The stage split, the phase convention and the input rate of one slot per
// two clocks are this design's reading of the document's short description.
module kmp_cslow_unit
  import kmp_pkg::*;
#(
  parameter int unsigned K     = 16,
  parameter int unsigned DEPTH = K / 2,
  parameter int unsigned MW    = 2,
  parameter int unsigned BIT0  = 0,
  parameter int unsigned BIT1  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          phase,
  input  beat_t         pkt_in,
  input  logic [MW-1:0] mvec_in,
  output beat_t         pkt_out,
  output logic [MW-1:0] mvec_out,
  input  cfg_word_t     cfg_in,
  output cfg_word_t     cfg_out,
  output logic [1:0]    match,
  output logic [1:0]    pkt_done,
  output logic [1:0]    pkt_match,
  output logic          overflow,
  output logic [1:0]    stall,
  output logic [1:0]    dual,
  output logic [1:0]    ready
);

  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // per-context state
  logic [QW-1:0] qidx   [2];
  logic [AW:0]   rd_ptr [2];
  logic [1:0]    in_pkt, seen;

  // shared buffer and pattern memories
  logic [AW:0]   wr_ptr, s1_count;
  beat_t         rd0, rd1;
  cfg_word_t     cfg_mid;
  pat_entry_t    pm_pat0 [2];
  pat_entry_t    pm_pat1 [2];
  logic          s1, s2;          // context in the memory / compare stage
  logic          mark_en;
  logic [AW-1:0] mark_addr;
  logic [MW-1:0] mark_bits;

  assign s1 = phase;
  assign s2 = ~phase;

  cslow_buffer #(.DEPTH(DEPTH), .MW(MW)) u_buf (
    .clk, .rst_n,
    .wr_en    (phase),
    .in_beat  (pkt_in),
    .in_mvec  (mvec_in),
    .wr_ptr,
    .rd_ptr   (rd_ptr[s1]),
    .rd0, .rd1,
    .mark_en, .mark_addr, .mark_bits,
    .out_beat (pkt_out),
    .out_mvec (mvec_out)
  );

  pattern_memory #(.K(K)) u_pat0 (
    .clk, .rst_n, .cfg_in, .cfg_out (cfg_mid),
    .rd_idx (qidx[0]), .pat0 (pm_pat0[0]), .pat1 (pm_pat1[0]), .ready (ready[0])
  );

  pattern_memory #(.K(K)) u_pat1 (
    .clk, .rst_n, .cfg_in (cfg_mid), .cfg_out,
    .rd_idx (qidx[1]), .pat0 (pm_pat0[1]), .pat1 (pm_pat1[1]), .ready (ready[1])
  );

  // ---------------- S1 -> S2 pipeline registers ----------------
  beat_t      p_rd0, p_rd1;
  pat_entry_t p_pat0, p_pat1;
  logic       p_have0, p_have1;

  assign s1_count = wr_ptr - rd_ptr[s1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      p_rd0   <= '0;
      p_rd1   <= '0;
      p_pat0  <= '0;
      p_pat1  <= '0;
      p_have0 <= 1'b0;
      p_have1 <= 1'b0;
    end else begin
      phase   <= ~phase;
      p_rd0   <= rd0;
      p_rd1   <= rd1;
      p_pat0  <= pm_pat0[s1];
      p_pat1  <= pm_pat1[s1];
      p_have0 <= (s1_count != '0);
      p_have1 <= (s1_count > (AW+1)'(1));
    end
  end

  // ---------------- S2: compare and update ----------------
  logic [QW-1:0] qidx_nx;
  logic [1:0]    consume;
  logic          in_pkt_nx, seen_nx, s2_match, last_consumed, last_second;
  logic          s2_stall, s2_dual;
  logic [AW:0]   rd_nx, wr_after;

  kmp_step #(.K(K)) u_step (
    .have0 (p_have0), .have1 (p_have1),
    .rd0 (p_rd0), .rd1 (p_rd1), .pat0 (p_pat0), .pat1 (p_pat1),
    .ready (ready[s2]),
    .qidx (qidx[s2]), .in_pkt (in_pkt[s2]), .seen (seen[s2]),
    .qidx_nx, .consume, .in_pkt_nx, .seen_nx,
    .match (s2_match), .last_consumed, .last_second,
    .stall (s2_stall), .dual (s2_dual)
  );

  assign rd_nx     = rd_ptr[s2] + (AW+1)'(consume);
  assign wr_after  = wr_ptr + (AW+1)'(phase);
  assign overflow  = (wr_after - rd_nx) > (AW+1)'(DEPTH);
  assign mark_en   = last_consumed && (seen[s2] | s2_match);
  assign mark_addr = rd_ptr[s2][AW-1:0] + (last_second ? AW'(1) : AW'(0));
  assign mark_bits = s2 ? (MW'(1) << BIT1) : (MW'(1) << BIT0);

  always_comb begin
    match     = '0;
    pkt_done  = '0;
    pkt_match = '0;
    stall     = '0;
    dual      = '0;
    match[s2]     = s2_match;
    pkt_done[s2]  = last_consumed;
    pkt_match[s2] = seen[s2] | s2_match;
    stall[s2]     = s2_stall;
    dual[s2]      = s2_dual;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qidx[0]   <= '0;
      qidx[1]   <= '0;
      rd_ptr[0] <= '0;
      rd_ptr[1] <= '0;
      in_pkt    <= '0;
      seen      <= '0;
    end else begin
      qidx[s2]   <= qidx_nx;
      rd_ptr[s2] <= rd_nx;
      in_pkt[s2] <= in_pkt_nx;
      seen[s2]   <= seen_nx;
    end
  end

endmodule
