// tb_pattern_memory: self-checking testbench of the pattern/jump memory.
//
// Sends two back-to-back patterns' worth of configuration words (2K words,
// the first flagged) plus idle gaps, then checks: every entry on both read
// ports, 'ready' low during the load and high after the K-th word, and the
// second K words leaving on cfg_out one clock after they arrived, the first
// of them flagged 'first'. A second load with fewer than K words must leave
// 'ready' low.
module tb_pattern_memory;
  import kmp_pkg::*;

  localparam int K  = 16;
  localparam int QW = $clog2(K);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_word_t cfg_in, cfg_out;
  logic [QW-1:0] rd_idx;
  pat_entry_t pat0, pat1;
  logic ready;

  pattern_memory #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pat_entry_t words[2*K];
  int n_out;

  task automatic send(input pat_entry_t d, input bit first);
    @(negedge clk);
    cfg_in.valid = 1'b1;
    cfg_in.first = first;
    cfg_in.data  = d;
  endtask

  initial begin
    cfg_in = '0; rd_idx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!ready, "not ready after reset");
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 2 * K; i++) words[i] = pat_entry_t'($urandom);
      n_out = 0;
      for (int i = 0; i < 2 * K; i++) begin
        send(words[i], i == 0);
        #1;
        // cfg_out shows the word forwarded at the previous edge
        if (i > K && !(round == 1 && (i - 1) % 5 == 0)) begin
          check(cfg_out.valid && cfg_out.data == words[i-1] && cfg_out.first == (i - 1 == K),
                $sformatf("forwarded word %0d", i - 1));
          n_out++;
        end else
          check(!cfg_out.valid, "nothing forwarded while filling");
        if (i > 0 && i < K) check(!ready, "not ready while loading");
        if (i == K) check(ready, "ready after K words");
        // idle gaps in the stream are allowed
        if (round == 1 && i % 5 == 0) begin
          @(negedge clk) cfg_in = '0;
          #1;
          if (i >= K) begin
            check(cfg_out.valid && cfg_out.data == words[i] && cfg_out.first == (i == K),
                  $sformatf("forwarded word %0d before a gap", i));
            n_out++;
          end
        end
      end
      @(negedge clk) cfg_in = '0;
      #1;
      check(cfg_out.valid && cfg_out.data == words[2*K-1], "last forwarded word");
      n_out++;
      check(n_out == K, "K words forwarded");
      @(negedge clk);
      check(!cfg_out.valid, "forwarding stops");
      for (int q = 0; q < K; q++) begin
        rd_idx = QW'(q);
        #1;
        check(pat0 == words[q], $sformatf("port 0 entry %0d", q));
        if (q < K - 1) check(pat1 == words[q+1], $sformatf("port 1 entry %0d", q + 1));
      end
    end
    // an incomplete reload leaves the memory not ready
    for (int i = 0; i < K / 2; i++) send(pat_entry_t'($urandom), i == 0);
    @(negedge clk) cfg_in = '0;
    repeat (3) @(negedge clk);
    check(!ready, "incomplete reload is not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
