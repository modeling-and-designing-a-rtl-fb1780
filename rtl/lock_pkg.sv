// lock_pkg: shared types of the serial combination lock.
//
// state_t names the eight states of the lock after how much of the
// combination 0110111 has been seen (A = nothing, B = "0", C = "01",
// D = "011", E = "0110", F = "01101", G = "011011", H = "0110111").
// The state letters are those of the original state table; the binary
// encoding (A = 0 ... H = 7) is this design's own choice and may be left
// to the synthesis tool to re-encode.
// lock_out_t bundles the two Mealy outputs in the order the state table
// prints them: unlk first, then hint.
`timescale 1ns / 1ps
package lock_pkg;

  typedef enum logic [2:0] {
    ST_A = 3'd0,  // got nothing
    ST_B = 3'd1,  // got 0
    ST_C = 3'd2,  // got 01
    ST_D = 3'd3,  // got 011
    ST_E = 3'd4,  // got 0110
    ST_F = 3'd5,  // got 01101
    ST_G = 3'd6,  // got 011011
    ST_H = 3'd7   // got 0110111
  } state_t;

  typedef struct packed {
    logic unlk;
    logic hint;
  } lock_out_t;

endpackage
