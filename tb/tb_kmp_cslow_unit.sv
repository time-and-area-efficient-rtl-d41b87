// tb_kmp_cslow_unit: self-checking testbench of the pipelined two-pattern
// unit.
//
// Loads two patterns (2K configuration words: context 0 first, then context
// 1) and streams packets at the unit's rate of one slot per two clocks,
// presenting a new slot on every clock with phase = 1. Checks, against
// reference results computed here by direct search:
//   - each context's number of match pulses and result per packet;
//   - that each context finishes a packet within DEPTH slot times (2*DEPTH
//     clocks) plus the pipeline stage after its last character was written,
//     and that 'overflow' never rises;
//   - that pkt_out repeats the input stream DEPTH slots later and that each
//     last character carries the incoming match vector plus the bits of the
//     contexts whose pattern occurred.
// Workloads: Fibonacci and "aaa...ab" patterns with the document's
// functional-simulation text, texts of pattern prefixes each broken by a
// wrong character, then random pattern pairs reloaded between packets, the
// next packet queued behind the reload.
module tb_kmp_cslow_unit;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int K     = 16;
  localparam int DEPTH = K / 2;
  localparam int MW    = 4;
  localparam int B0    = 1;
  localparam int B1    = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic phase;
  beat_t pkt_in, pkt_out;
  logic [MW-1:0] mvec_in, mvec_out;
  cfg_word_t cfg_in, cfg_out;
  logic [1:0] match, pkt_done, pkt_match, stall, dual, ready;
  logic overflow;

  kmp_cslow_unit #(.K(K), .DEPTH(DEPTH), .MW(MW), .BIT0(B0), .BIT1(B1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    beat_t         b;
    logic [MW-1:0] mv;   // incoming vector
    logic [MW-1:0] ex;   // expected outgoing vector
  } slot_t;

  bytes_t    pats[2];
  slot_t     slots[$];
  cfg_word_t cfgq[$];
  slot_t     sent[int];
  int        exp_cnt[2][$];
  int        last_clk[2][$];
  int        clk_no = 0, nw = 0;
  int        cur[2];
  int        n_done[2];
  int        n_stall = 0, n_dual = 0, n_match = 0, n_out = 0;

  task automatic add_packet(input bytes_t txt, input int gap);
    logic [MW-1:0] mv = MW'($urandom);
    logic [MW-1:0] ex = mv;
    for (int c = 0; c < 2; c++) begin
      int n = count_matches(pats[c], txt);
      exp_cnt[c].push_back(n);
      if (n > 0) ex[c ? B1 : B0] = 1'b1;
    end
    foreach (txt[i]) begin
      slot_t s;
      s.b  = {1'b1, i == txt.size() - 1, txt[i]};
      s.mv = s.b.last ? mv : '0;
      s.ex = s.b.last ? ex : '0;
      slots.push_back(s);
    end
    repeat (gap) begin
      slot_t s;
      s.b = '0; s.mv = '0; s.ex = '0;
      slots.push_back(s);
    end
  endtask

  task automatic add_patterns();
    for (int c = 0; c < 2; c++) begin
      int nx[];
      compute_next(pats[c], nx);
      for (int i = 0; i < K; i++) begin
        cfg_word_t w;
        w.valid = 1'b1;
        w.first = (c == 0 && i == 0);
        w.data.ch = pats[c][i];
        w.data.jump = jump_t'(nx[i+1]);
        cfgq.push_back(w);
      end
    end
  endtask

  // a new slot is presented while phase = 1, and written at the end of it
  always @(negedge clk) begin
    if (rst_n && phase) begin
      slot_t s;
      if (slots.size() > 0) s = slots.pop_front();
      else begin s.b = '0; s.mv = '0; s.ex = '0; end
      pkt_in  <= s.b;
      mvec_in <= s.mv;
      sent[nw] = s;
      if (s.b.valid && s.b.last) begin
        last_clk[0].push_back(clk_no + 1);
        last_clk[1].push_back(clk_no + 1);
      end
      nw++;
    end
    if (rst_n && cfgq.size() > 0) cfg_in <= cfgq.pop_front();
    else cfg_in <= '0;
  end

  always @(posedge clk) begin
    clk_no++;
    if (rst_n) begin
      check(!overflow, "overflow");
      for (int c = 0; c < 2; c++) begin
        if (match[c]) begin cur[c]++; n_match++; end
        if (stall[c]) n_stall++;
        if (dual[c]) n_dual++;
        if (pkt_done[c]) begin
          int e, lc;
          e  = exp_cnt[c].size() ? exp_cnt[c].pop_front() : -1;
          lc = last_clk[c].size() ? last_clk[c].pop_front() : -1000;
          check(cur[c] == e, $sformatf("context %0d: %0d matches, expected %0d", c, cur[c], e));
          check(pkt_match[c] == (e > 0), $sformatf("context %0d: pkt_match", c));
          check(clk_no - lc >= 1 && clk_no - lc <= 2 * DEPTH + 1,
                $sformatf("context %0d finished %0d clocks after the last write", c, clk_no - lc));
          cur[c] = 0;
          n_done[c]++;
        end
      end
      check(!(pkt_done[0] && pkt_done[1]), "contexts take turns");
      // before the write at this edge, pkt_out holds the slot evicted by the
      // previous write, with every mark applied
      if (phase && nw >= 2 && sent.exists(nw - 2 - DEPTH)) begin
        slot_t e;
        e = sent[nw - 2 - DEPTH];
        check(pkt_out == e.b, "delayed stream");
        if (e.b.valid && e.b.last) begin
          check(mvec_out == e.ex, $sformatf("match vector %b, expected %b", mvec_out, e.ex));
          n_out++;
        end
        sent.delete(nw - 2 - DEPTH);
      end
    end
  end

  function automatic bytes_t rand_text(input int len, input int alpha);
    bytes_t t;
    for (int i = 0; i < len; i++) t.push_back(8'h61 + byte'($urandom_range(alpha - 1)));
    return t;
  endfunction

  int total = 0;
  initial begin
    pkt_in = '0; mvec_in = '0; cfg_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pats[0] = fibonacci(K);
    pats[1] = {};
    repeat (K - 1) pats[1].push_back(8'h61);
    pats[1].push_back(8'h62);
    add_patterns();
    while (cfgq.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);
    check(ready == 2'b11, "both pattern memories loaded");
    begin
      bytes_t t = pats[0];
      t[K-1] = (t[K-1] == 8'h61) ? 8'h62 : 8'h61;
      add_packet({t, pats[0], t, pats[1], 8'h61, pats[1]}, 0);
      total++;
    end
    // adversarial texts: prefixes of the two patterns (the Fibonacci string
    // and its mirror with a and b exchanged), each broken by a wrong
    // character; the packet is queued behind a reload, so matching starts on
    // a filled buffer
    for (int r = 0; r < 10; r++) begin
      bytes_t t = {};
      while (slots.size() > 0) @(posedge clk);
      repeat (2 * DEPTH + 4) @(posedge clk);
      pats[0] = fibonacci(K);
      pats[1] = {};
      foreach (pats[0][i]) pats[1].push_back(pats[0][i] ^ 8'h03);
      add_patterns();
      repeat (2 * K - 2 * DEPTH) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        int n = $urandom_range(K - 1);
        int c = $urandom_range(1);
        for (int i = 0; i < n; i++) t.push_back(pats[c][i]);
        t.push_back(8'h63);
      end
      add_packet(t, 0);
      total++;
    end
    for (int r = 0; r < 20; r++) begin
      begin
        while (slots.size() > 0) @(posedge clk);
        repeat (2 * DEPTH + 4) @(posedge clk);
        pats[0] = rand_text(K, 2 + r % 2);
        pats[1] = rand_text(K, 2 + (r / 2) % 2);
        add_patterns();
        repeat (2 * K - 2 * DEPTH) @(posedge clk);
      end
      for (int p = 0; p < 6; p++) begin
        bytes_t t = rand_text(1 + $urandom_range(70), 2 + $urandom_range(1));
        for (int k = 0; k < 2; k++)
          if (t.size() > K && $urandom_range(2) != 0) begin
            int at = $urandom_range(t.size() - K);
            for (int i = 0; i < K; i++) t[at + i] = pats[k][i];
          end
        add_packet(t, $urandom_range(3) == 0 ? $urandom_range(3) : 0);
        total++;
      end
    end
    while (slots.size() > 0) @(posedge clk);
    repeat (4 * DEPTH + 8) @(posedge clk);
    $display("packets=%0d matches=%0d stalls=%0d dual=%0d", n_out, n_match, n_stall, n_dual);
    check(n_out == total, "every packet left the unit");
    check(n_done[0] == total && n_done[1] == total, "both contexts finished every packet");
    check(n_match > 0 && n_stall > 0 && n_dual > 0, "match, stall and double match seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
