// pprg_pkg: shared types for the parity preserving reversible gate (PPRG)
// and the arithmetic built from it.
//
// pprg_in_t bundles the five gate inputs A..E and pprg_out_t the five gate
// outputs P..T, in that order from the most significant bit down.
// The gate is parity preserving: the XOR of its five outputs always equals
// the XOR of its five inputs. Any circuit made only of such gates keeps the
// same property, which is what the fault detection in this design rests on.
package pprg_pkg;

  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
    logic e;
  } pprg_in_t;

  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic s;
    logic t;
  } pprg_out_t;

  // Number of garbage (unused) outputs of every PPRG adder cell: P, S, T.
  localparam int unsigned GARBAGE_PER_CELL = 3;

endpackage
