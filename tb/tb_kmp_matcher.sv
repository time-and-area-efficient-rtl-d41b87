// tb_kmp_matcher: self-checking testbench of the two-comparator matcher.
//
// The testbench stands in for the input buffer and the pattern memory: it
// keeps the character stream (one character enters per clock) and the
// pattern with its jump table, and answers the matcher's read addresses.
// Every clock it checks the index update against the document's C1/C2
// table, recomputing C1 and C2 from the characters itself:
//   C1=0: q <- next[q], no input advance (q <- 1, +1 when next[q] = 0)
//   C1=1, C2=0: q <- next[q+1], +1 (q <- 1, +2 when next[q+1] = 0)
//   C1=1, C2=1: q <- q+2, +2
// It also checks, per packet, the number of matches reported against a
// direct search, that the buffer never holds more than DEPTH unread
// characters, and that the matcher does not start a packet while the
// pattern is not ready.
module tb_kmp_matcher;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int K     = 16;
  localparam int DEPTH = 8;
  localparam int QW    = $clog2(K);
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t rd0, rd1;
  logic [AW:0] count, rd_ptr;
  logic [1:0] rd_consume;
  logic [QW-1:0] qidx;
  pat_entry_t pat0, pat1;
  logic ready, match, pkt_done, pkt_match, mark_en, stall, dual;
  logic [AW-1:0] mark_addr;

  kmp_matcher #(.K(K), .DEPTH(DEPTH)) dut (.*);

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

  // stream model
  beat_t stream[int];
  int    wr = 0;
  int    rdp = 0;
  bytes_t pat;
  int    nx[];
  int    n_case[4];
  int    n_wait = 0;

  int    ver = 0;   // bumped on every change of the stream or the pattern

  always_comb begin
    if (ver < 0) $display("never");
    rd0 = stream.exists(rdp) ? stream[rdp] : beat_t'(0);
    rd1 = stream.exists(rdp + 1) ? stream[rdp + 1] : beat_t'(0);
    count = (AW+1)'(wr - rdp);
    pat0.ch = pat[qidx];
    pat0.jump = jump_t'(nx[qidx + 1]);
    pat1.ch = (qidx < K - 1) ? pat[qidx + 1] : 8'h00;
    pat1.jump = (qidx < K - 1) ? jump_t'(nx[qidx + 2]) : jump_t'(0);
  end

  task automatic push(input beat_t b);
    @(negedge clk);
    stream[wr] = b;
    wr++;
    ver++;
  endtask

  // per-clock check of the update table
  int q_exp, adv_exp, cur;
  bit c1, c2, use2, pkt_open = 0;
  int exp_q[$];
  int exp_cnt[$];
  always @(posedge clk) if (rst_n) begin
    int q, avail;
    q = qidx + 1;          // 1-based pattern index
    avail = wr - rdp;
    check(avail <= DEPTH, "more than DEPTH characters waiting");
    check(rd_ptr == (AW+1)'(rdp), "read pointer");
    q_exp = q; adv_exp = 0;
    if (avail >= 1 && !rd0.valid) begin
      adv_exp = (avail >= 2 && !rd1.valid) ? 2 : 1;
    end else if (avail >= 1 && !pkt_open && !ready) begin
      n_wait++;
    end else if (avail >= 1) begin
      use2 = (avail >= 2) && rd1.valid && !rd0.last && q < K;
      c1 = (rd0.ch == pat[q-1]);
      c2 = use2 && (rd1.ch == pat[q]);
      if (!c1) begin
        n_case[0]++;
        if (nx[q] == 0) begin q_exp = 1; adv_exp = 1; end
        else q_exp = nx[q];
      end else if (q == K) begin
        q_exp = 1; adv_exp = 1;
      end else if (!use2) begin
        n_case[1]++;
        q_exp = q + 1; adv_exp = 1;
      end else if (!c2) begin
        n_case[2]++;
        if (nx[q+1] == 0) begin q_exp = 1; adv_exp = 2; end
        else begin q_exp = nx[q+1]; adv_exp = 1; end
      end else begin
        n_case[3]++;
        q_exp = (q + 1 == K) ? 1 : q + 2; adv_exp = 2;
      end
      if ((adv_exp >= 1 && rd0.last) || (adv_exp == 2 && rd1.last)) q_exp = 1;
      if (adv_exp >= 1) pkt_open = 1;
      if ((adv_exp >= 1 && rd0.last) || (adv_exp == 2 && rd1.last)) pkt_open = 0;
    end
    check(rd_consume == 2'(adv_exp), $sformatf("input advance %0d, expected %0d", rd_consume, adv_exp));
    if (match) cur++;
    if (pkt_done) begin
      int e;
      e = exp_cnt.size() ? exp_cnt.pop_front() : -1;
      check(cur == e, $sformatf("matches in packet %0d, expected %0d", cur, e));
      check(pkt_match == (e > 0), "pkt_match");
      check(mark_en == (e > 0), "mark_en");
      // the slot to mark is the one holding the packet's last character
      check(mark_addr == AW'(rd0.last ? rdp : rdp + 1), "mark address");
      cur = 0;
    end
    rdp += adv_exp;
    exp_q.push_back(q_exp);
  end
  always @(posedge clk) if (rst_n) begin
    #1;
    if (exp_q.size()) check(qidx + 1 == exp_q.pop_front(), "pattern index update");
  end

  task automatic load(input bytes_t p);
    pat = p;
    compute_next(pat, nx);
    ver++;
  endtask

  task automatic packet(input bytes_t t, input int gap);
    exp_cnt.push_back(count_matches(pat, t));
    foreach (t[i]) push({1'b1, i == t.size() - 1, t[i]});
    repeat (gap) push('0);
  endtask

  bytes_t t;
  initial begin
    cur = 0;
    ready = 1'b0;
    load(fibonacci(K));
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // a packet arrives before the pattern is ready and must wait
    fork
      begin
        repeat (DEPTH / 2) @(negedge clk);
        ready = 1'b1;
      end
    join_none
    packet(fibonacci(K), 0);
    repeat (DEPTH) push('0);
    // the document's functional simulation: 15 of 16 characters match
    t = fibonacci(K);
    t[K-1] = (t[K-1] == 8'h61) ? 8'h62 : 8'h61;
    packet({t, t, fibonacci(K), 8'h61}, 2);
    for (int r = 0; r < 300; r++) begin
      int len = 1 + $urandom_range(60);
      if (r % 50 == 0) begin
        bytes_t p;
        while (exp_cnt.size()) @(posedge clk);
        p = {};
        for (int i = 0; i < K; i++) p.push_back(8'h61 + byte'($urandom_range(1 + r % 3)));
        load(p);
      end
      t = {};
      for (int i = 0; i < len; i++) t.push_back(8'h61 + byte'($urandom_range(1 + r % 3)));
      if (len > K && $urandom_range(1)) begin
        int at = $urandom_range(len - K);
        for (int i = 0; i < K; i++) t[at + i] = pat[i];
      end
      packet(t, $urandom_range(3) == 0 ? $urandom_range(4) : 0);
    end
    repeat (3 * DEPTH) push('0);
    @(negedge clk);
    $display("table cases: C1=0 %0d, C1 only %0d, C1=1 C2=0 %0d, C1=C2=1 %0d; waits %0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_wait);
    check(n_case[0] > 0 && n_case[1] > 0 && n_case[2] > 0 && n_case[3] > 0 && n_wait > 0,
          "every row of the update table exercised");
    check(exp_cnt.size() == 0, "all packets finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
