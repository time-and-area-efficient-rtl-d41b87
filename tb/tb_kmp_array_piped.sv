// tb_kmp_array_piped: end-to-end testbench of a row of pipelined units
// (PIPELINED = 1): 8 units with two 16-character patterns each, 16
// patterns in all.
//
// Loads all 16 patterns through the configuration chain (256 words), then
// streams packets at the row's rate of one slot per two clocks, presenting
// each slot while slot_take is high. Checks, against reference results
// computed here by direct search, the match vector at the end of the row,
// every pattern's per-packet result and match count, the delay of the
// stream through the row (K/2+1 slots per unit), that no unit overflows and
// that each pattern finishes a packet within 2*(K/2)+1 clocks of its last
// character reaching the unit. Midway the whole row is reloaded while the
// next packets wait behind the reload. Counts and requires: match,
// comparator stall, double match and a packet start that waits for a reload.
module tb_kmp_array_piped;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int N     = 8;
  localparam int NP    = 2 * N;
  localparam int K     = 16;
  localparam int DEPTH = K / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_take;
  beat_t pkt_in, pkt_out;
  logic [NP-1:0] mvec_out, match, pkt_done, pkt_match, overflow, stall, dual, ready;
  cfg_word_t cfg_in, cfg_out;

  kmp_array #(.N_UNITS(N), .K(K), .DEPTH(DEPTH), .PIPELINED(1'b1)) dut (.*);

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
    beat_t         b;
    logic [NP-1:0] ex;
  } slot_t;

  bytes_t    pats[NP];
  slot_t     slots[$];
  cfg_word_t cfgq[$];
  slot_t     sent[int];
  int        exp_cnt[NP][$];
  int        last_clk[NP][$];
  int        clk_no = 0, nw = 0;
  int        cur[NP];
  int        n_done[NP];
  int        n_stall = 0, n_dual = 0, n_match = 0, n_out = 0, n_wait = 0;

  task automatic add_packet(input bytes_t txt, input int gap);
    logic [NP-1:0] ex = '0;
    for (int p = 0; p < NP; p++) begin
      int n = count_matches(pats[p], txt);
      exp_cnt[p].push_back(n);
      ex[p] = (n > 0);
    end
    foreach (txt[i]) begin
      slot_t s;
      s.b  = {1'b1, i == txt.size() - 1, txt[i]};
      s.ex = s.b.last ? ex : '0;
      slots.push_back(s);
    end
    repeat (gap) begin
      slot_t s;
      s.b = '0; s.ex = '0;
      slots.push_back(s);
    end
  endtask

  task automatic add_patterns();
    for (int p = 0; p < NP; p++) begin
      int nx[];
      compute_next(pats[p], nx);
      for (int i = 0; i < K; i++) begin
        cfg_word_t w;
        w.valid = 1'b1;
        w.first = (p == 0 && i == 0);
        w.data.ch = pats[p][i];
        w.data.jump = jump_t'(nx[i+1]);
        cfgq.push_back(w);
      end
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && slot_take) begin
      slot_t s;
      if (slots.size() > 0) s = slots.pop_front();
      else begin s.b = '0; s.ex = '0; end
      pkt_in <= s.b;
      sent[nw] = s;
      if (s.b.valid && s.b.last)
        for (int p = 0; p < NP; p++) last_clk[p].push_back(clk_no + 1 + 2 * (p / 2) * (DEPTH + 1));
      nw++;
    end
    if (rst_n && cfgq.size() > 0) cfg_in <= cfgq.pop_front();
    else cfg_in <= '0;
  end

  always @(posedge clk) begin
    clk_no++;
    if (rst_n) begin
      for (int p = 0; p < NP; p++) begin
        check(!overflow[p], $sformatf("pattern %0d overflow", p));
        if (match[p]) begin cur[p]++; n_match++; end
        if (pkt_done[p]) begin
          int e, lc;
          e  = exp_cnt[p].size() ? exp_cnt[p].pop_front() : -1;
          lc = last_clk[p].size() ? last_clk[p].pop_front() : -1000;
          check(cur[p] == e, $sformatf("pattern %0d: %0d matches, expected %0d", p, cur[p], e));
          check(pkt_match[p] == (e > 0), $sformatf("pattern %0d: pkt_match", p));
          check(clk_no - lc >= 1 && clk_no - lc <= 2 * DEPTH + 1,
                $sformatf("pattern %0d finished %0d clocks after its last character", p, clk_no - lc));
          cur[p] = 0;
          n_done[p]++;
        end
      end
      n_stall += $countones(stall);
      n_dual  += $countones(dual);
      if (slot_take && sent.exists(nw - 1 - N * (DEPTH + 1))) begin
        slot_t e;
        e = sent[nw - 1 - N * (DEPTH + 1)];
        check(pkt_out == e.b, "row output is the input delayed by N*(K/2+1) slots");
        if (e.b.valid && e.b.last) begin
          check(mvec_out == e.ex, $sformatf("match vector %b, expected %b", mvec_out, e.ex));
          n_out++;
        end
        sent.delete(nw - 1 - N * (DEPTH + 1));
      end
    end
  end

  for (genvar u = 0; u < N; u++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_piped.g_unit[u].u_unit.p_have0 &&
          dut.g_piped.g_unit[u].u_unit.p_rd0.valid &&
          !dut.g_piped.g_unit[u].u_unit.in_pkt[dut.g_piped.g_unit[u].u_unit.s2] &&
          !ready[2*u + dut.g_piped.g_unit[u].u_unit.s2]) n_wait++;
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
      for (int k = 0; k < 2; k++)
        if (t.size() > K && $urandom_range(2) != 0) begin
          int q  = $urandom_range(NP - 1);
          int at = $urandom_range(t.size() - K);
          for (int i = 0; i < K; i++) t[at + i] = pats[q][i];
        end
      add_packet(t, $urandom_range(3) == 0 ? $urandom_range(3) : 0);
    end
  endtask

  int total = 0;
  initial begin
    pkt_in = '0; cfg_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pats[0] = fibonacci(K);
    pats[1] = {};
    repeat (K - 1) pats[1].push_back(8'h61);
    pats[1].push_back(8'h62);
    for (int p = 2; p < NP; p++) pats[p] = rand_text(K, 2 + p % 2);
    add_patterns();
    while (cfgq.size() > 0) @(posedge clk);
    repeat (NP + 2) @(posedge clk);   // one clock per pattern memory passed
    check(ready == '1, "all pattern memories loaded");
    traffic(50);
    total += 50;
    while (slots.size() > 0) @(posedge clk);
    repeat (4 * DEPTH) @(posedge clk);
    for (int p = 0; p < NP; p++) pats[p] = rand_text(K, 2 + (p + 1) % 2);
    add_patterns();
    repeat (NP * K - 2 * N * DEPTH) @(posedge clk);
    traffic(50);
    total += 50;
    while (slots.size() > 0) @(posedge clk);
    repeat (2 * N * (DEPTH + 1) + 4 * DEPTH + 8) @(posedge clk);
    $display("packets=%0d matches=%0d stalls=%0d dual=%0d reload_waits=%0d",
             n_out, n_match, n_stall, n_dual, n_wait);
    check(n_out == total, "every packet left the row");
    for (int p = 0; p < NP; p++) check(n_done[p] == total, $sformatf("pattern %0d finished every packet", p));
    check(n_match > 0, "mechanism: match");
    check(n_stall > 0, "mechanism: comparator stall");
    check(n_dual > 0,  "mechanism: both comparators match");
    check(n_wait > 0,  "mechanism: packet waits for a pattern reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
