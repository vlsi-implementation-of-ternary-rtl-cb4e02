// Shared types of the three-operand adder.
//
// pg_t is the (generate, propagate) pair that every stage of the parallel
// prefix adder passes around: the base logic makes one per bit, the black and
// gray cells of the prefix tree combine them into group pairs G_{i:j}/P_{i:j}.
// Purely combinational; there is no clock anywhere in this design.
package toa_pkg;

  typedef struct packed {
    logic g;  // generate: the span produces a carry by itself
    logic p;  // propagate: the span passes an incoming carry through
  } pg_t;

endpackage
