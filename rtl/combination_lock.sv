// combination_lock: serial combination lock, an eight-state Mealy machine.
//
// One bit of the combination arrives on x per rising clock edge. The lock
// opens (unlk = 1) when x = 0 arrives while the last seven bits received
// were 0110111, i.e. it recognises the eight-bit pattern 01101110. hint is 1
// whenever the present bit is the one that moves the lock closer to being
// unlocked, so a user can find the combination bit by bit.
//
// Structure: one state register (state_t from lock_pkg) and two blocks of
// combinational logic, one for the next state and one for the outputs,
// both a case over the current state and x. The transition and output
// table is the published one, including its irregular cases: a wrong bit
// sends the lock back to A (after a wrong 1) or B (after a wrong 0, since
// that 0 may start a new attempt), except in state G, where a 0 leads to E
// because the bits 0110 that end "011011" + "0" are themselves the first
// four bits of the combination.
//
//   state  x=0          x=1           (next state, unlk hint)
//   A      B, 01        A, 00
//   B      B, 00        C, 01
//   C      B, 00        D, 01
//   D      E, 01        A, 00
//   E      B, 00        F, 01
//   F      B, 00        G, 01
//   G      E, 00        H, 01
//   H      B, 11        A, 00
//
// Interface and timing:
//   clk    state changes on the rising edge.
//   reset  active high and asynchronous, puts the lock in state A at once,
//          as the original clocked process with reset in its sensitivity
//          list does.
//   x      serial input, sampled at the rising edge.
//   unlk, hint  Mealy outputs, combinational from the current state and x:
//          they are valid in the same cycle as the x they refer to, before
//          the edge that acts on it.
// The ports, the state table and the reset behaviour follow the original
// design; the state encoding is this design's own choice.
`timescale 1ns / 1ps
module combination_lock
  import lock_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic x,
  output logic unlk,
  output logic hint
);

  state_t    state, state_next;
  lock_out_t out;

  // State register with asynchronous reset to A.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= ST_A;
    else       state <= state_next;
  end

  // Next state and Mealy outputs.
  always_comb begin
    state_next = ST_A;
    out        = '0;
    unique case (state)
      ST_A: if (!x) begin state_next = ST_B; out = '{unlk: 1'b0, hint: 1'b1}; end
            else    begin state_next = ST_A; out = '{unlk: 1'b0, hint: 1'b0}; end
      ST_B: if (!x) begin state_next = ST_B; out = '{unlk: 1'b0, hint: 1'b0}; end
            else    begin state_next = ST_C; out = '{unlk: 1'b0, hint: 1'b1}; end
      ST_C: if (!x) begin state_next = ST_B; out = '{unlk: 1'b0, hint: 1'b0}; end
            else    begin state_next = ST_D; out = '{unlk: 1'b0, hint: 1'b1}; end
      ST_D: if (!x) begin state_next = ST_E; out = '{unlk: 1'b0, hint: 1'b1}; end
            else    begin state_next = ST_A; out = '{unlk: 1'b0, hint: 1'b0}; end
      ST_E: if (!x) begin state_next = ST_B; out = '{unlk: 1'b0, hint: 1'b0}; end
            else    begin state_next = ST_F; out = '{unlk: 1'b0, hint: 1'b1}; end
      ST_F: if (!x) begin state_next = ST_B; out = '{unlk: 1'b0, hint: 1'b0}; end
            else    begin state_next = ST_G; out = '{unlk: 1'b0, hint: 1'b1}; end
      ST_G: if (!x) begin state_next = ST_E; out = '{unlk: 1'b0, hint: 1'b0}; end
            else    begin state_next = ST_H; out = '{unlk: 1'b0, hint: 1'b1}; end
      ST_H: if (!x) begin state_next = ST_B; out = '{unlk: 1'b1, hint: 1'b1}; end
            else    begin state_next = ST_A; out = '{unlk: 1'b0, hint: 1'b0}; end
      default: begin state_next = ST_A; out = '0; end
    endcase
  end

  assign unlk = out.unlk;
  assign hint = out.hint;

  // The lock may only open from the fully matched state on a 0, and an
  // opening bit is always a hinted one.
  a_unlk_only_in_h: assert property (@(posedge clk)
    unlk |-> (state == ST_H && !x && hint));

endmodule
