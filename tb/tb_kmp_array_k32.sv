// tb_kmp_array_k32: end-to-end testbench of a row of 8 units built for
// 32-character patterns (K = 32, 16-slot buffers), the larger pattern size
// the design targets. It runs the same tests as the default-size row test:
// Loads a different pattern into every unit through the single daisy-chained
// configuration stream (unit 0: the worst-case Fibonacci string, unit 1:
// "aaa...ab", the others random), then streams packets at one character per
// clock with occurrences of random units' patterns planted in them. Checks,
// against reference results computed here by direct search:
//   - the match vector on each packet's last character at the end of the row;
//   - each unit's per-packet result and its number of match pulses;
//   - the packet stream leaving the row N_UNITS*(K/2+1) clocks after entry;
//   - that no unit's buffer ever overflows and that every unit finishes a
//     packet within K/2 clocks of its last character arriving there.
// Midway the whole row is reloaded with new patterns while the next packets
// are already queued behind the reload. Each mechanism (comparator stall,
// double match, single-comparator step, match, packet wait for a reload,
// configuration forwarding, idle-slot skipping) is counted and must occur.
module tb_kmp_array_k32;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int N     = 8;
  localparam int K     = 32;
  localparam int DEPTH = K / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t pkt_in, pkt_out;
  logic slot_take;
  logic [N-1:0] mvec_out, match, pkt_done, pkt_match, overflow, stall, dual, ready;
  cfg_word_t cfg_in, cfg_out;

  kmp_array #(.N_UNITS(N), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    beat_t        b;
    logic [N-1:0] mv;    // expected match vector (on last characters)
  } slot_t;

  bytes_t    pats[N];
  slot_t     slots[$];
  cfg_word_t cfgq[$];
  slot_t     hist[int];
  int        exp_cnt[N][$];
  int        last_edge[$];
  int        unit_last[N][$];
  int        edge_no = 0;
  int        cur[N];
  int        n_pkts_out = 0, n_done[N];
  int        n_stall = 0, n_dual = 0, n_single = 0, n_match = 0, n_wait = 0,
             n_fwd = 0, n_idle = 0;

  task automatic add_packet(input bytes_t txt, input int gap);
    logic [N-1:0] mv = '0;
    for (int u = 0; u < N; u++) begin
      int c = count_matches(pats[u], txt);
      exp_cnt[u].push_back(c);
      mv[u] = (c > 0);
    end
    foreach (txt[i]) begin
      slot_t s;
      s.b = {1'b1, i == txt.size() - 1, txt[i]};
      s.mv = mv;
      slots.push_back(s);
    end
    repeat (gap) begin
      slot_t s;
      s.b = '0; s.mv = '0;
      slots.push_back(s);
    end
  endtask

  task automatic add_patterns();
    for (int u = 0; u < N; u++) begin
      int nx[];
      compute_next(pats[u], nx);
      for (int i = 0; i < K; i++) begin
        cfg_word_t w;
        w.valid = 1'b1;
        w.first = (u == 0 && i == 0);
        w.data.ch = pats[u][i];
        w.data.jump = jump_t'(nx[i+1]);
        cfgq.push_back(w);
      end
    end
  endtask

  always @(negedge clk) begin
    slot_t s;
    if (rst_n && slots.size() > 0) s = slots.pop_front();
    else begin s.b = '0; s.mv = '0; end
    pkt_in <= s.b;
    hist[edge_no + 1] = s;
    if (s.b.valid && s.b.last) last_edge.push_back(edge_no + 1);
    if (rst_n && cfgq.size() > 0) cfg_in <= cfgq.pop_front();
    else cfg_in <= '0;
  end

  always @(posedge clk) begin
    edge_no++;
    if (rst_n) begin
      for (int u = 0; u < N; u++) begin
        check(!overflow[u], $sformatf("unit %0d buffer overflow", u));
        if (match[u]) begin cur[u]++; n_match++; end
        if (pkt_done[u]) begin
          int c, le;
          c = exp_cnt[u].size() ? exp_cnt[u].pop_front() : -1;
          check(cur[u] == c, $sformatf("unit %0d: %0d matches, expected %0d", u, cur[u], c));
          check(pkt_match[u] == (c > 0), $sformatf("unit %0d: pkt_match", u));
          // the last character reaches unit u u*(DEPTH+1) clocks after entry
          le = unit_last[u].size() ? unit_last[u].pop_front() : -1000;
          check(edge_no - le >= 1 && edge_no - le <= DEPTH,
                $sformatf("unit %0d finished %0d clocks after the last character", u, edge_no - le));
          cur[u] = 0;
          n_done[u]++;
        end
      end
      n_stall  += $countones(stall);
      n_dual   += $countones(dual);
      if (cfg_out.valid) n_fwd++;
      // last characters entering the row
      if (hist.exists(edge_no) && hist[edge_no].b.valid && hist[edge_no].b.last)
        for (int u = 0; u < N; u++) unit_last[u].push_back(edge_no + u * (DEPTH + 1));
      if (hist.exists(edge_no - N * (DEPTH + 1))) begin
        slot_t e;
        e = hist[edge_no - N * (DEPTH + 1)];
        check(pkt_out == e.b, "row output is the input delayed by N*(K/2+1)");
        if (e.b.valid && e.b.last) begin
          check(mvec_out == e.mv, $sformatf("match vector %b, expected %b", mvec_out, e.mv));
          n_pkts_out++;
        end
        hist.delete(edge_no - N * (DEPTH + 1));
      end
    end
  end

  // mechanisms inside the units, observed from outside the row
  for (genvar u = 0; u < N; u++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_plain.g_unit[u].u_unit.u_match.rd_consume == 2'd1 &&
          dut.g_plain.g_unit[u].u_unit.u_match.rd0.valid &&
          dut.g_plain.g_unit[u].u_unit.u_match.u_step.use2 == 1'b0) n_single++;
      if (dut.g_plain.g_unit[u].u_unit.u_match.count != '0 &&
          !dut.g_plain.g_unit[u].u_unit.u_match.rd0.valid) n_idle++;
      if (dut.g_plain.g_unit[u].u_unit.u_match.count != '0 &&
          dut.g_plain.g_unit[u].u_unit.u_match.rd0.valid &&
          !dut.g_plain.g_unit[u].u_unit.u_match.in_pkt && !ready[u]) n_wait++;
    end
  end

  function automatic bytes_t rand_text(input int len, input int alpha);
    bytes_t t;
    for (int i = 0; i < len; i++) t.push_back(8'h61 + byte'($urandom_range(alpha - 1)));
    return t;
  endfunction

  task automatic traffic(input int npk);
    for (int p = 0; p < npk; p++) begin
      bytes_t t = rand_text(1 + $urandom_range(90), 2 + $urandom_range(1));
      // plant one or two patterns of random units
      for (int k = 0; k < 2; k++)
        if (t.size() > K && $urandom_range(2) != 0) begin
          int u  = $urandom_range(N - 1);
          int at = $urandom_range(t.size() - K);
          for (int i = 0; i < K; i++) t[at + i] = pats[u][i];
        end
      add_packet(t, $urandom_range(3) == 0 ? $urandom_range(3) : 0);
    end
  endtask

  int total_pkts = 0;
  initial begin
    pkt_in = '0; cfg_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    pats[0] = fibonacci(K);
    pats[1] = {};
    repeat (K - 1) pats[1].push_back(8'h61);
    pats[1].push_back(8'h62);
    for (int u = 2; u < N; u++) pats[u] = rand_text(K, 2 + u % 2);
    add_patterns();
    while (cfgq.size() > 0) @(posedge clk);
    repeat (N + 2) @(posedge clk);
    check(ready == '1, "all units loaded");

    // the document's functional simulation text for the Fibonacci unit
    begin
      bytes_t t = pats[0];
      t[K-1] = (t[K-1] == 8'h61) ? 8'h62 : 8'h61;
      add_packet({t, pats[0], t}, 0);
      total_pkts++;
    end
    traffic(60);
    total_pkts += 60;
    while (slots.size() > 0) @(posedge clk);

    // reload every unit; the next packets follow the reload stream
    repeat (DEPTH + 2) @(posedge clk);
    for (int u = 0; u < N; u++) pats[u] = rand_text(K, 2 + (u + 1) % 2);
    add_patterns();
    repeat (N * (K - DEPTH)) @(posedge clk);
    traffic(60);
    total_pkts += 60;
    while (slots.size() > 0) @(posedge clk);
    repeat (N * (DEPTH + 1) + 2 * DEPTH) @(posedge clk);

    $display("packets=%0d matches=%0d stalls=%0d dual=%0d single=%0d reload_waits=%0d fwd=%0d idle=%0d",
             n_pkts_out, n_match, n_stall, n_dual, n_single, n_wait, n_fwd, n_idle);
    check(n_pkts_out == total_pkts, "every packet left the row");
    for (int u = 0; u < N; u++) check(n_done[u] == total_pkts, $sformatf("unit %0d finished every packet", u));
    check(n_match > 0,  "mechanism: match");
    check(n_stall > 0,  "mechanism: comparator stall");
    check(n_dual > 0,   "mechanism: both comparators match");
    check(n_single > 0, "mechanism: single-comparator step");
    check(n_wait > 0,   "mechanism: packet waits for a pattern reload");
    check(n_fwd == 0,   "no configuration word leaves a full row");
    check(n_idle > 0,   "mechanism: idle slots skipped");
    check(slot_take,    "unpipelined row takes a slot every clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
