// tb_lock_waveforms: end-to-end replay of the lock's reference simulations.
//
// The lock was originally verified with six waveform runs at a 100 ns clock,
// each showing a printed sequence of states: the full combination A..H with
// a reset, and the wrong-bit transitions A->A, B->B, C->B, D->A, E->B, F->B,
// G->E and H->B. This testbench replays those runs on the design at its
// default configuration. For each run it holds the input bits that produce
// the printed state sequence (derived from the state table) and the state
// letters themselves, and checks after every rising edge that the design is
// in the printed state, and before every edge that unlk and hint match the
// state table. An 'R' in an input string raises reset between two edges and
// holds it across one edge. Every transition named by a run, the unlock and
// the reset must occur at least once; one that does not counts as a failure.
`timescale 1ns / 1ps
module tb_lock_waveforms;
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

  typedef struct {
    string name;
    string inputs;   // one character per clock: '0', '1' or 'R' (reset)
    string states;   // state after each clock, as printed in the run
    string focus;    // transitions the run is meant to show, "XY" pairs
  } run_t;

  localparam int NRUNS = 6;
  run_t runs [NRUNS] = '{
    '{"correct sequence and reset", "01101110R0", "BCDEFGHBAB", "ABBCCDDEEFFGGHHB"},
    '{"B->B, A->A, D->A, C->B",      "100101110",  "ABBCBCDAB",  "BBAADACB"},
    '{"E->B",                        "011001110",  "BCDEBCDAB",  "EB"},
    '{"G->E",                        "01101101110","BCDEFGEFGHB","GE"},
    '{"F->B",                        "01101011",   "BCDEFBCD",   "FB"},
    '{"H->B",                        "0110111011", "BCDEFGHBCD", "HB"}
  };

  // Transitions seen, indexed by from/to letter.
  int seen [8][8];
  int unlock_cnt = 0;
  int reset_cnt = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  function automatic byte cur();
    return state_letter(dut.state.name());
  endfunction

  // Reset pulse between two edges, then one edge with x = 1, which keeps
  // the lock in A; the run starts right after that edge.
  task automatic start_run();
    @(posedge clk);
    #20;
    reset = 1'b1;
    #1;
    check(cur() == "A", "reset did not force A");
    #10;
    reset = 1'b0;
    @(posedge clk);
    #1;
    check(cur() == "A", "lock left A after reset (x = 1 must hold it there)");
  endtask

  task automatic play(run_t r);
    byte  s = "A";
    ref_t t;
    $display("run: %s", r.name);
    x = 1'b1;
    start_run();
    for (int i = 0; i < r.inputs.len(); i++) begin
      byte  want = r.states[i];
      if (r.inputs[i] == "R") begin
        #20;
        reset = 1'b1;
        #1;
        check(cur() == want, $sformatf("%s: reset left state %c, expected %c", r.name, cur(), want));
        @(posedge clk);
        #1;
        reset = 1'b0;
        reset_cnt++;
        seen[3'(s - "A")][3'(want - "A")]++;
        s = want;
        continue;
      end
      x = (r.inputs[i] == "1");
      t = ref_step(s, x);
      check(t.nxt == want, $sformatf("%s: printed state %c disagrees with the table (%c)", r.name, want, t.nxt));
      #10;
      check(unlk == t.unlk && hint == t.hint,
            $sformatf("%s: state %c x=%0b: unlk/hint %0b%0b, expected %0b%0b",
                      r.name, s, x, unlk, hint, t.unlk, t.hint));
      if (unlk) unlock_cnt++;
      @(posedge clk);
      #1;
      check(cur() == want, $sformatf("%s: step %0d state %c, expected %c", r.name, i, cur(), want));
      seen[3'(s - "A")][3'(want - "A")]++;
      s = want;
    end
  endtask

  initial begin
    for (int k = 0; k < NRUNS; k++) play(runs[k]);

    for (int k = 0; k < NRUNS; k++)
      for (int j = 0; j + 1 < runs[k].focus.len(); j += 2) begin
        automatic byte a = runs[k].focus[j];
        automatic byte b = runs[k].focus[j + 1];
        check(seen[3'(a - "A")][3'(b - "A")] > 0, $sformatf("transition %c->%c never happened", a, b));
      end
    check(unlock_cnt > 0, "lock never opened");
    check(reset_cnt > 0, "reset never applied");
    $display("unlocks=%0d resets=%0d", unlock_cnt, reset_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
