// tb_functional_sim: cycle-level replay of worst-case scenarios for one
// unit with the 16-character Fibonacci pattern abaababaabaababa.
//
// Two packets, each starting while the pattern is still being loaded, so
// the unit's buffer holds K/2 characters when matching begins (a preloaded
// buffer):
//  A. The first 15 characters match, the 16th does not. The first 7 cycles
//     use both comparators (14 characters), cycle 8 finds one character
//     left and matches P[15] with C1, cycle 9 fails P[16]; with the
//     optimised jump table next[16] = 0, so the character is dropped at once.
//  B. The input matches up to the position with the longest jump chain
//     (q* = 12: next = 7, 4, 2, 1, 0), then a character matching nothing.
//     Five dual cycles match P[1..10]; cycle 6 matches P[11] with C1 while
//     C2 fails P[12]; the read pointer then stalls for 3 clocks (P[7], P[4],
//     P[2]) and the character is dropped at P[1].
// The expected traces (characters consumed per clock) are worked out by
// hand from the update table; the jump table comes from compute_next. The
// first clocks of each run are printed (pattern index q, unread characters,
// characters consumed), which shows the read pointer gaining on the write
// pointer while both comparators match and falling back while it stalls. Also
// checked: no overflow, a packet of n characters is finished within n + K/2
// clocks of its first character, and its last character is consumed within
// K/2 clocks of its arrival, before it leaves the buffer.
module tb_functional_sim;
  import kmp_pkg::*;
  import kmp_tb_pkg::*;

  localparam int K     = 16;
  localparam int DEPTH = K / 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t pkt_in, pkt_out;
  logic [7:0] mvec_in, mvec_out;
  cfg_word_t cfg_in, cfg_out;
  logic match, pkt_done, pkt_match, overflow, stall, dual, ready;

  kmp_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bytes_t fib, txt;
  int nx[];
  int trace[$];        // characters consumed in each clock since matching began
  int fill_at_start;
  int first_clk, last_clk, done_clk, clk_no = 0;
  bit started = 0;
  int longest, qstar, len;

  always @(posedge clk) begin
    clk_no++;
    if (rst_n) begin
      check(!overflow, "buffer overflow");
      if (!started && dut.u_match.rd_consume != 2'd0 && dut.u_match.rd0.valid) begin
        started = 1;
        fill_at_start = int'(dut.u_buf.count);
      end
      if (started && trace.size() < 12)
        $display("  clock %2d: q=%2d unread=%0d consumed=%0d", trace.size() + 1,
                 int'(dut.u_match.qidx) + 1, int'(dut.u_buf.count), int'(dut.u_match.rd_consume));
      if (started && trace.size() < 40) trace.push_back(int'(dut.u_match.rd_consume));
      if (pkt_done && done_clk == 0) done_clk = clk_no;
    end
  end

  task automatic run(input bytes_t t, input int exp[]);
    trace = {};
    started = 0;
    done_clk = 0;
    fork
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        cfg_in = {1'b1, i == 0, fib[i], jump_t'(nx[i+1])};
      end
      begin
        repeat (K - DEPTH) @(negedge clk);
        foreach (t[i]) begin
          @(negedge clk);
          pkt_in = {1'b1, i == t.size() - 1, t[i]};
          if (i == 0) first_clk = clk_no + 1;
          last_clk = clk_no + 1;
        end
        @(negedge clk) pkt_in = '0;
      end
    join_none
    repeat (K + 1) @(negedge clk);
    cfg_in = '0;
    wait (done_clk != 0 && done_clk >= last_clk);
    repeat (3 * DEPTH) @(posedge clk);
    $display("preloaded %0d, consumed per clock: %p", fill_at_start, trace[0:exp.size()-1]);
    check(fill_at_start == DEPTH, $sformatf("matching starts with %0d buffered characters", fill_at_start));
    foreach (exp[c])
      check(trace[c] == exp[c], $sformatf("clock %0d consumed %0d, expected %0d", c + 1, trace[c], exp[c]));
    check(!pkt_match, "no occurrence in the packet");
    // the result must be known before the last character leaves the buffer
    $display("last character consumed %0d clocks after it arrived", done_clk - last_clk);
    check(done_clk - first_clk + 1 <= t.size() + DEPTH,
          $sformatf("packet of %0d characters took %0d clocks", t.size(), done_clk - first_clk + 1));
    check(done_clk - last_clk <= DEPTH,
          $sformatf("last character consumed %0d clocks after arrival", done_clk - last_clk));
  endtask

  initial begin
    pkt_in = '0; mvec_in = '0; cfg_in = '0;
    fib = fibonacci(K);
    compute_next(fib, nx);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A: 15 of 16 characters match
    txt = {fib[0:K-2], (fib[K-1] == 8'h61) ? 8'h62 : 8'h61};
    for (int i = 0; i < 20; i++) txt.push_back(8'h63);
    run(txt, '{2, 2, 2, 2, 2, 2, 2, 1, 1, 1});

    // B: fail at the position with the longest jump chain
    longest = -1;
    for (int q = 1; q <= K; q++) begin
      len = 0;
      for (int x = nx[q]; x != 0; x = nx[x]) len++;
      if (len > longest) begin longest = len; qstar = q; end
    end
    check(qstar == 12 && longest == 4, $sformatf("longest jump chain %0d at q=%0d", longest, qstar));
    check(longest <= 5, "jump chain within log_phi(16)");
    txt = {fib[0:qstar-2], 8'h63};
    for (int i = 0; i < 20; i++) txt.push_back(8'h63);
    run(txt, '{2, 2, 2, 2, 2, 1, 0, 0, 0, 1});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
