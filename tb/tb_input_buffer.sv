// tb_input_buffer: self-checking testbench of the circular input buffer.
//
// Writes a random stream (one slot per clock) and moves the read pointer by
// 0, 1 or 2 slots per clock as a matcher would, keeping a reference model
// of the buffer contents here. Checks both asynchronous read ports, the
// unread count, the DEPTH+1 clock delay of the outgoing stream, the OR of
// match-vector marks (including a mark on the slot evicted in the same
// clock) and the overflow flag when the buffer is full and not read.
module tb_input_buffer;
  import kmp_pkg::*;

  localparam int DEPTH = 8;
  localparam int MW    = 4;
  localparam int AW    = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  beat_t in_beat, rd0, rd1, out_beat;
  logic [MW-1:0] in_mvec, out_mvec, mark_bits;
  logic [AW:0] rd_ptr, count;
  logic [1:0] rd_consume;
  logic mark_en, overflow;
  logic [AW-1:0] mark_addr;

  input_buffer #(.DEPTH(DEPTH), .MW(MW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // reference: every slot ever written, by stream index
  beat_t         s_beat[int];
  logic [MW-1:0] s_mvec[int];
  int wr = 0, rd = 0, n_ovf = 0, n_fwdmark = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_beat = '0; in_mvec = '0; rd_ptr = '0; rd_consume = '0;
    mark_en = 0; mark_addr = '0; mark_bits = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int avail, c, m;
      bit full_idle;
      // drive this clock
      @(negedge clk);
      avail = wr - rd;
      full_idle = (cyc % 500 >= 250 && cyc % 500 < 250 + DEPTH + 2);  // stop reading: overflow
      c = full_idle ? 0 : $urandom_range(2);
      if (avail == DEPTH && c == 0 && !full_idle) c = 1;
      if (c > avail) c = avail;
      in_beat = beat_t'($urandom);
      in_mvec = MW'($urandom);
      rd_ptr = (AW+1)'(rd);
      rd_consume = 2'(c);
      mark_en = 0;
      m = -1;
      if (avail > 0 && $urandom_range(3) == 0) begin
        // mark the oldest unread slot: when the buffer is full this is the
        // slot evicted in this clock
        m = rd;
        mark_en = 1;
        mark_addr = AW'(rd);
        mark_bits = MW'($urandom);
      end
      #1;
      // combinational checks
      check(count == (AW+1)'(avail), "count");
      if (avail >= 1) check(rd0 == s_beat[rd], "read port 0");
      if (avail >= 2) check(rd1 == s_beat[rd + 1], "read port 1");
      check(overflow == (avail == DEPTH && c == 0), "overflow flag");
      if (overflow) n_ovf++;
      if (m >= 0) begin
        if (m == wr - DEPTH) n_fwdmark++;
        s_mvec[m] = s_mvec[m] | mark_bits;
      end
      @(posedge clk);
      s_beat[wr] = in_beat;
      s_mvec[wr] = in_mvec;
      wr++;
      rd += c;
      if (avail == DEPTH && c == 0) rd++;   // the lost slot is gone
      #1;
      // output: slot wr-1-DEPTH left the buffer at this edge
      if (wr - 1 - DEPTH >= 0) begin
        check(out_beat == s_beat[wr - 1 - DEPTH], "delayed stream");
        check(out_mvec == s_mvec[wr - 1 - DEPTH], "delayed match vector");
      end else
        check(out_beat.valid == 1'b0, "idle slots after reset");
    end
    $display("overflows=%0d evict_marks=%0d", n_ovf, n_fwdmark);
    check(n_ovf > 0 && n_fwdmark > 0, "overflow and same-clock mark seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
