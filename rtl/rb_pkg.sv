// rb_pkg: types shared by the redundant-basis (RB) multiplier structures.
//
// A multiplication is processed as Q consecutive "digit cycles". Every
// pipeline stage carries a small tag next to its data so the final
// accumulator knows which cycle of a multiplication the data belongs to:
// `valid` marks a live cycle, `first` the digit cycle t = 0 (the
// accumulator clears) and `last` the digit cycle t = Q-1 (the result is
// complete). The tag encoding is a choice of this design; the structures
// it serves (PS-I, PS-II, PS-III) follow the systolic organisation of
// bit-permutation module, partial product generation module and finite
// field accumulator.
package rb_pkg;

  typedef struct packed {
    logic valid;  // this cycle carries data of a multiplication
    logic first;  // digit cycle t = 0
    logic last;   // digit cycle t = Q-1
  } rb_tag_t;

endpackage
