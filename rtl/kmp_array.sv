// kmp_array: a row of daisy-chained two-comparator KMP matching units.
//
// N_UNITS units, each holding one pattern of K characters, are chained
// as in the document's linear array: the packet stream, the match vector
// and the configuration stream each pass from a unit only to its right
// neighbour, so no signal fans out to the whole row.
//
// Unpipelined row (PIPELINED = 0, the default): kmp_unit, one pattern per
// unit. A packet enters one character per clock at pkt_in (slot_take is
// always high) and leaves at pkt_out after N_UNITS * (K/2 + 1) clocks; on
// its last character, mvec_out has bit i set when the pattern of unit i
// occurred in the packet.
//
// Pipelined row (PIPELINED = 1): kmp_cslow_unit, two patterns per unit on
// shared hardware, so the row holds 2*N_UNITS patterns (bits 2i and 2i+1
// of mvec_out belong to unit i). The stream advances one slot per two
// clocks: pkt_in is taken on clocks with slot_take high, and pkt_out
// changes on the clock after.
//
// Patterns are reloaded by sending K {character, jump} words per pattern on
// cfg_in, the first flagged 'first': the first pattern's words fill unit 0
// (both memories of unit 0 when pipelined), and so on down the row. Event
// outputs (match, pkt_done, pkt_match, stall, dual, ready) have one bit per
// pattern; overflow has one bit per pattern (both bits of a pipelined unit
// show that unit's flag). The row length is this design's choice; the
// document leaves it open.
module kmp_array
  import kmp_pkg::*;
#(
  parameter int unsigned N_UNITS   = 8,
  parameter int unsigned K         = 16,
  parameter int unsigned DEPTH     = K / 2,
  parameter bit          PIPELINED = 1'b0,
  localparam int unsigned NP = PIPELINED ? 2 * N_UNITS : N_UNITS
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          slot_take,
  input  beat_t         pkt_in,
  output beat_t         pkt_out,
  output logic [NP-1:0] mvec_out,
  input  cfg_word_t     cfg_in,
  output cfg_word_t     cfg_out,
  output logic [NP-1:0] match,
  output logic [NP-1:0] pkt_done,
  output logic [NP-1:0] pkt_match,
  output logic [NP-1:0] overflow,
  output logic [NP-1:0] stall,
  output logic [NP-1:0] dual,
  output logic [NP-1:0] ready
);

  beat_t         pkt_c  [N_UNITS+1];
  logic [NP-1:0] mvec_c [N_UNITS+1];
  cfg_word_t     cfg_c  [N_UNITS+1];

  assign pkt_c[0]  = pkt_in;
  assign mvec_c[0] = '0;
  assign cfg_c[0]  = cfg_in;
  assign pkt_out   = pkt_c[N_UNITS];
  assign mvec_out  = mvec_c[N_UNITS];
  assign cfg_out   = cfg_c[N_UNITS];

  if (!PIPELINED) begin : g_plain
    assign slot_take = 1'b1;
    for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
      kmp_unit #(.K(K), .DEPTH(DEPTH), .MW(NP), .UNIT_IDX(i)) u_unit (
        .clk, .rst_n,
        .pkt_in    (pkt_c[i]),
        .mvec_in   (mvec_c[i]),
        .pkt_out   (pkt_c[i+1]),
        .mvec_out  (mvec_c[i+1]),
        .cfg_in    (cfg_c[i]),
        .cfg_out   (cfg_c[i+1]),
        .match     (match[i]),
        .pkt_done  (pkt_done[i]),
        .pkt_match (pkt_match[i]),
        .overflow  (overflow[i]),
        .stall     (stall[i]),
        .dual      (dual[i]),
        .ready     (ready[i])
      );
    end
  end else begin : g_piped
    logic [N_UNITS-1:0] phase;
    assign slot_take = phase[0];
    for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
      kmp_cslow_unit #(.K(K), .DEPTH(DEPTH), .MW(NP), .BIT0(2*i), .BIT1(2*i+1)) u_unit (
        .clk, .rst_n,
        .phase     (phase[i]),
        .pkt_in    (pkt_c[i]),
        .mvec_in   (mvec_c[i]),
        .pkt_out   (pkt_c[i+1]),
        .mvec_out  (mvec_c[i+1]),
        .cfg_in    (cfg_c[i]),
        .cfg_out   (cfg_c[i+1]),
        .match     (match[2*i+1:2*i]),
        .pkt_done  (pkt_done[2*i+1:2*i]),
        .pkt_match (pkt_match[2*i+1:2*i]),
        .overflow  (overflow[2*i]),
        .stall     (stall[2*i+1:2*i]),
        .dual      (dual[2*i+1:2*i]),
        .ready     (ready[2*i+1:2*i])
      );
      assign overflow[2*i+1] = overflow[2*i];
    end
  end

endmodule
