// lock_ref_pkg: reference model of the combination lock for testbenches.
//
// States are kept as the letters 'A'..'H' rather than the RTL enum, so the
// model shares nothing with the design but the published state table,
// which ref_step() transcribes row by row. ref_step() returns, for the
// current state and input bit, the next state and the two Mealy outputs.
// state_letter() turns the design's enum name ("ST_C") into its letter so
// testbenches can compare states without relying on the binary encoding.
`timescale 1ns / 1ps
package lock_ref_pkg;

  typedef struct {
    byte nxt;
    bit  unlk;
    bit  hint;
  } ref_t;

  function automatic ref_t ref_step(byte s, bit x);
    ref_t r;
    case ({s, x})
      {"A", 1'b0}: r = '{"B", 1'b0, 1'b1};
      {"A", 1'b1}: r = '{"A", 1'b0, 1'b0};
      {"B", 1'b0}: r = '{"B", 1'b0, 1'b0};
      {"B", 1'b1}: r = '{"C", 1'b0, 1'b1};
      {"C", 1'b0}: r = '{"B", 1'b0, 1'b0};
      {"C", 1'b1}: r = '{"D", 1'b0, 1'b1};
      {"D", 1'b0}: r = '{"E", 1'b0, 1'b1};
      {"D", 1'b1}: r = '{"A", 1'b0, 1'b0};
      {"E", 1'b0}: r = '{"B", 1'b0, 1'b0};
      {"E", 1'b1}: r = '{"F", 1'b0, 1'b1};
      {"F", 1'b0}: r = '{"B", 1'b0, 1'b0};
      {"F", 1'b1}: r = '{"G", 1'b0, 1'b1};
      {"G", 1'b0}: r = '{"E", 1'b0, 1'b0};
      {"G", 1'b1}: r = '{"H", 1'b0, 1'b1};
      {"H", 1'b0}: r = '{"B", 1'b1, 1'b1};
      {"H", 1'b1}: r = '{"A", 1'b0, 1'b0};
      default:     r = '{"?", 1'b0, 1'b0};
    endcase
    return r;
  endfunction

  // "ST_C" -> "C"; anything else -> "?".
  function automatic byte state_letter(string enum_name);
    if (enum_name.len() == 4 && enum_name.substr(0, 2) == "ST_")
      return enum_name[3];
    return "?";
  endfunction

endpackage
