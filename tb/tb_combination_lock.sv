// tb_combination_lock: self-checking testbench of the combination lock.
//
// Two independent references are compared with the design on every bit:
//   * the state table, transcribed in lock_ref_pkg (next state, unlk, hint);
//   * the specification of the lock itself: unlk must be 1 exactly when x is
//     0 and the seven bits received since reset before it were 0110111.
//     A shift register of received bits models this without any states.
// The stimulus covers every one of the 16 table entries from a clean reset,
// the combination after random prefixes, long random bit streams with
// random resets, and asynchronous resets raised between clock edges. Each
// transition, each unlock and each reset is counted; one that never happens
// counts as a failure. Clock period 100 ns; x changes just after a rising
// edge, outputs are checked before the next edge, the state right after it.
`timescale 1ns / 1ps
module tb_combination_lock;
  import lock_ref_pkg::*;

  logic clk;
  logic reset = 1'b0;
  logic x = 1'b0;
  logic unlk, hint;

  int checks = 0;
  int failures = 0;

  combination_lock dut (.clk(clk), .reset(reset), .x(x), .unlk(unlk), .hint(hint));

  initial begin
    clk = 1'b0;
    forever #50 clk = ~clk;
  end

  // Reference state.
  byte       m_state = "A";
  bit  [6:0] hist = '0;
  int        nbits = 0;

  // Coverage.
  int trans_cnt [8][2];
  int unlock_cnt = 0;
  int reset_cnt = 0;
  int async_reset_cnt = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // Apply one input bit for one clock period. Called just after a rising edge.
  task automatic step(bit xv);
    ref_t r;
    bit   spec_unlk;
    x = xv;
    #10;
    r = ref_step(m_state, xv);
    spec_unlk = !xv && nbits >= 7 && hist == 7'b0110111;
    check(unlk == r.unlk, $sformatf("unlk=%0b, table says %0b (state %c, x=%0b)", unlk, r.unlk, m_state, xv));
    check(hint == r.hint, $sformatf("hint=%0b, table says %0b (state %c, x=%0b)", hint, r.hint, m_state, xv));
    check(unlk == spec_unlk, $sformatf("unlk=%0b, input history says %0b", unlk, spec_unlk));
    trans_cnt[3'(m_state - "A")][xv]++;
    if (unlk) unlock_cnt++;
    @(posedge clk);
    #1;
    m_state = r.nxt;
    hist = {hist[5:0], xv};
    nbits++;
    check(state_letter(dut.state.name()) == m_state,
          $sformatf("state %s, expected %c", dut.state.name(), m_state));
  endtask

  // Synchronous-looking reset: held across one rising edge.
  task automatic do_reset();
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    m_state = "A";
    hist = '0;
    nbits = 0;
    reset_cnt++;
    check(state_letter(dut.state.name()) == "A", "state not A after reset");
  endtask

  // Reset raised between edges must act at once, without a clock edge.
  task automatic async_reset();
    #20;
    reset = 1'b1;
    #1;
    check(state_letter(dut.state.name()) == "A",
          $sformatf("asynchronous reset did not act at once (state %s)", dut.state.name()));
    @(posedge clk);
    #1;
    check(state_letter(dut.state.name()) == "A", "state left A while reset held");
    #20;
    reset = 1'b0;
    m_state = "A";
    hist = '0;
    nbits = 0;
    reset_cnt++;
    async_reset_cnt++;
  endtask

  task automatic send(string bits);
    for (int i = 0; i < bits.len(); i++) step(bits[i] == "1");
  endtask

  // Shortest path from reset to each state, taken from the state table.
  string prefix [8] = '{"", "0", "01", "011", "0110", "01101", "011011", "0110111"};

  initial begin
    #1;
    reset = 1'b1;
    #19;
    check(state_letter(dut.state.name()) == "A", "state not A after power-on reset");
    reset = 1'b0;

    // 1. Every entry of the state table from a clean reset.
    for (int s = 0; s < 8; s++) begin
      for (int xv = 0; xv < 2; xv++) begin
        do_reset();
        send(prefix[s]);
        check(m_state == byte'("A" + s), "prefix did not reach the intended state");
        step(xv[0]);
      end
    end

    // 2. The combination after random prefixes must always open the lock.
    for (int n = 0; n < 200; n++) begin
      automatic int len = $urandom_range(0, 12);
      for (int i = 0; i < len; i++) step(1'($urandom_range(0, 1)));
      send("01101110");
      check(unlock_cnt > 0, "no unlock yet");
    end

    // 3. Long random stream with occasional resets, biased towards the
    //    combination so deep states are visited often.
    for (int n = 0; n < 6000; n++) begin
      if ($urandom_range(0, 99) == 0) do_reset();
      else if ($urandom_range(0, 3) == 0) step(1'($urandom_range(0, 1)));
      else step(byte'(prefix[7][nbits % 7]) == "1");
    end

    // 4. Asynchronous reset from every state.
    for (int s = 1; s < 8; s++) begin
      do_reset();
      send(prefix[s]);
      async_reset();
      send("01101110");
    end

    // Coverage: every mechanism must have happened.
    for (int s = 0; s < 8; s++)
      for (int xv = 0; xv < 2; xv++)
        check(trans_cnt[s][xv] > 0, $sformatf("transition %c,x=%0d never taken", byte'("A" + s), xv));
    check(unlock_cnt > 0, "lock never opened");
    check(reset_cnt > 0, "never reset");
    check(async_reset_cnt > 0, "never reset asynchronously");

    $display("coverage: unlocks=%0d resets=%0d async_resets=%0d", unlock_cnt, reset_cnt, async_reset_cnt);
    for (int s = 0; s < 8; s++)
      $display("  state %c: x=0 taken %0d, x=1 taken %0d", byte'("A" + s), trans_cnt[s][0], trans_cnt[s][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
