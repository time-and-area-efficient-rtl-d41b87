// tb_kmp_unit_k32: self-checking testbench of one matching unit built for
// 32-character patterns (K = 32, a 16-slot buffer), the larger of the two
// pattern sizes the design is meant for.
//
// Loads a pattern and its KMP jump table over the configuration port,
// streams packets one character per clock and checks, against reference
// results computed here by direct comparison:
//   - the number of 'match' pulses per packet and the packet's pkt_match;
//   - that every packet finishes (pkt_done) within K/2 clocks of its last
//     character entering the unit, and that 'overflow' never rises;
//   - that pkt_out repeats pkt_in exactly K/2+1 clocks later and that the
//     last character carries the incoming match vector plus this unit's bit.
// Workloads: the 32-character Fibonacci pattern with texts made of pattern
// prefixes each broken by a wrong character, first with matching starting
// on an empty buffer and then with the buffer preloaded: each packet starts
// K/2 clocks before its pattern has finished loading, so matching begins
// with the buffer (nearly) full, the start-up the design is sized for. Then
// the "aaa...ab" pattern, and random patterns and texts over small
// alphabets, each pattern reloaded so that the next packet's first K/2
// characters arrive during the reload.
module tb_kmp_unit_k32;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int K     = 32;
  localparam int DEPTH = K / 2;
  localparam int MW    = 4;
  localparam int UIDX  = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t pkt_in, pkt_out;
  logic [MW-1:0] mvec_in, mvec_out;
  cfg_word_t cfg_in, cfg_out;
  logic match, pkt_done, pkt_match, overflow, stall, dual, ready;

  kmp_unit #(.K(K), .DEPTH(DEPTH), .MW(MW), .UNIT_IDX(UIDX)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---------------- stimulus queues ----------------
  typedef struct {
    beat_t         b;
    logic [MW-1:0] mv;
    bit            flag;   // expected: pattern occurs in this packet
  } slot_t;
  slot_t     slots[$];
  cfg_word_t cfgq[$];
  slot_t     hist[int];
  int        exp_cnt[$];   // expected matches per packet, in order
  int        last_edge[$]; // edge at which each packet's last character entered
  int        edge_no = 0;
  int        n_pkts = 0, n_stall = 0, n_dual = 0, n_wait = 0, n_fwd = 0;
  int        cur_matches = 0;
  int        max_fill = 0;   // most unread characters seen in the buffer
  int        n_preload = 0;  // the same, by the end of the preloaded tests

  task automatic add_packet(input bytes_t pat, input bytes_t txt, input int gap);
    int c = count_matches(pat, txt);
    foreach (txt[i]) begin
      slot_t s;
      s.b.valid = 1'b1;
      s.b.last  = (i == txt.size() - 1);
      s.b.ch    = txt[i];
      s.mv      = s.b.last ? MW'($urandom) : '0;
      s.flag    = (c > 0);
      slots.push_back(s);
    end
    exp_cnt.push_back(c);
    repeat (gap) begin
      slot_t s;
      s.b = '0; s.mv = '0; s.flag = 0;
      slots.push_back(s);
    end
  endtask

  task automatic add_pattern(input bytes_t pat, input int extra);
    int nx[];
    compute_next(pat, nx);
    foreach (pat[i]) begin
      cfg_word_t w;
      w.valid = 1'b1;
      w.first = (i == 0);
      w.data.ch = pat[i];
      w.data.jump = jump_t'(nx[i+1]);
      cfgq.push_back(w);
    end
    repeat (extra) begin
      cfg_word_t w;
      w.valid = 1'b1; w.first = 1'b0; w.data = pat_entry_t'($urandom);
      cfgq.push_back(w);
    end
  endtask

  // drive on the falling edge for the next rising edge
  always @(negedge clk) begin
    slot_t s;
    if (rst_n && slots.size() > 0) s = slots.pop_front();
    else begin s.b = '0; s.mv = '0; s.flag = 0; end
    pkt_in  <= s.b;
    mvec_in <= s.mv;
    hist[edge_no + 1] = s;
    if (s.b.valid && s.b.last) last_edge.push_back(edge_no + 1);
    if (rst_n && cfgq.size() > 0) cfg_in <= cfgq.pop_front();
    else cfg_in <= '0;
  end

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    edge_no++;
    if (rst_n) begin
      check(!overflow, "buffer overflow");
      if (stall) n_stall++;
      if (int'(dut.u_buf.count) > max_fill) max_fill = int'(dut.u_buf.count);
      if (dual) n_dual++;
      if (pkt_in.valid && !dut.u_match.in_pkt && !ready) n_wait++;
      if (match) cur_matches++;
      if (pkt_done) begin
        int c, le;
        n_pkts++;
        c  = exp_cnt.size() ? exp_cnt.pop_front() : -1;
        le = last_edge.size() ? last_edge.pop_front() : -100;
        check(cur_matches == c, $sformatf("packet %0d: %0d matches, expected %0d", n_pkts, cur_matches, c));
        check(pkt_match == (c > 0), $sformatf("packet %0d: pkt_match", n_pkts));
        check(edge_no - le >= 1 && edge_no - le <= DEPTH,
              $sformatf("packet %0d finished %0d clocks after its last character", n_pkts, edge_no - le));
        cur_matches = 0;
      end
      if (hist.exists(edge_no - DEPTH - 1)) begin
        slot_t e;
        e = hist[edge_no - DEPTH - 1];
        check(pkt_out == e.b, $sformatf("pkt_out is not pkt_in delayed by DEPTH+1: %h vs %h", pkt_out, e.b));
        if (e.b.valid && e.b.last)
          check(mvec_out == (e.mv | (e.flag ? MW'(1 << UIDX) : MW'(0))), "match vector on last character");
        hist.delete(edge_no - DEPTH - 1);
      end
      if (cfg_out.valid) n_fwd++;
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain();
    while (slots.size() > 0 || cfgq.size() > 0) @(posedge clk);
    repeat (2 * DEPTH + 4) @(posedge clk);
  endtask

  bytes_t fib, txt, pat;
  int fwd_before;

  initial begin
    pkt_in = '0; mvec_in = '0; cfg_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Fibonacci pattern, as in the document's functional simulation
    fib = fibonacci(K);
    add_pattern(fib, 3);
    drain();
    check(ready, "pattern memory ready after K words");
    check(n_fwd == 3, "three surplus configuration words forwarded");
    txt = fib[0:K-2];
    txt.push_back(8'h62 ^ fib[K-1] ^ 8'h61);  // the 16th character differs
    txt = {txt, fib, fib[0:K-2], 8'h61, 8'h62, 8'h61};
    add_packet(fib, txt, 0);
    add_packet(fib, {fib, fib}, 0);
    add_packet(fib, {fib[0:9], fib, fib[0:12], fib[0:12], fib}, 3);
    // adversarial text: prefixes of the pattern, each broken by a wrong
    // character, so that every failure runs a long chain of jumps
    for (int r = 0; r < 40; r++) begin
      txt = {};
      for (int k = 0; k < 8; k++) begin
        int n = $urandom_range(K - 1);
        for (int i = 0; i < n; i++) txt.push_back(fib[i]);
        txt.push_back(fib[n] == 8'h61 ? 8'h62 : 8'h61);
      end
      add_packet(fib, txt, 0);
    end
    drain();
    $display("largest number of unread characters without preload: %0d", max_fill);
    check(max_fill <= DEPTH / 2, $sformatf("without preload at most K/4 unread characters, saw %0d", max_fill));

    // 1b. the same texts with a preloaded buffer: reload the pattern and
    //     start the packet K/2 clocks before the reload ends
    for (int r = 0; r < 20; r++) begin
      txt = {};
      for (int k = 0; k < 8; k++) begin
        int n = (k == 0) ? K - 1 - r : $urandom_range(K - 1);
        for (int i = 0; i < n; i++) txt.push_back(fib[i]);
        txt.push_back(fib[n] == 8'h61 ? 8'h62 : 8'h61);
      end
      while (slots.size() > 0 || exp_cnt.size() > 0) @(posedge clk);
      add_pattern(fib, 0);
      repeat (K - DEPTH) @(posedge clk);
      add_packet(fib, txt, 0);
    end
    drain();
    n_preload = max_fill;

    // 2. "aaaa...ab": single-character jumps
    pat = {};
    repeat (K - 1) pat.push_back(8'h61);
    pat.push_back(8'h62);
    add_pattern(pat, 0);
    drain();
    txt = {};
    repeat (40) txt.push_back(8'h61);
    txt = {txt, pat, 8'h61, 8'h62, pat[1:K-1], pat};
    add_packet(pat, txt, 1);
    add_packet(pat, pat, 0);
    drain();

    // 3. random patterns and texts over a two- or three-letter alphabet,
    //    each pattern reloaded between packets while traffic continues
    for (int r = 0; r < 24; r++) begin
      int alpha = 2 + (r % 2);
      pat = {};
      for (int i = 0; i < K; i++) pat.push_back(8'h61 + byte'($urandom_range(alpha - 1)));
      // wait until the last packet is finished, then reload; the next
      // packet arrives while the reload is still running
      while (slots.size() > 0) @(posedge clk);
      while (exp_cnt.size() > 0) @(posedge clk);
      add_pattern(pat, 0);
      repeat (K - DEPTH) @(posedge clk);
      for (int p = 0; p < 6; p++) begin
        int len = 1 + $urandom_range(70);
        txt = {};
        for (int i = 0; i < len; i++) txt.push_back(8'h61 + byte'($urandom_range(alpha - 1)));
        // plant occurrences, sometimes overlapping, sometimes nearly complete
        if (len > K && $urandom_range(1)) begin
          int at = $urandom_range(len - K);
          int n  = K - $urandom_range(1);
          for (int i = 0; i < n; i++) txt[at + i] = pat[i];
        end
        add_packet(pat, txt, $urandom_range(2));
      end
    end
    drain();

    $display("packets=%0d stalls=%0d dual=%0d reload_waits=%0d", n_pkts, n_stall, n_dual, n_wait);
    $display("largest number of unread characters in the %0d-slot buffer: %0d", DEPTH, max_fill);
    check(n_pkts == 3 + 40 + 20 + 2 + 24 * 6, "all packets finished");
    check(n_preload >= DEPTH - 1, $sformatf("preloaded tests filled the buffer to %0d", n_preload));
    check(n_stall > 0 && n_dual > 0 && n_wait > 0, "stall, dual-match and reload wait all seen");
    check(exp_cnt.size() == 0, "no packet left unfinished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
