// ppa_pkg: types shared by the parallel prefix adder.
//
// A prefix node carries a (generate, propagate) pair for a group of bits.
// Inside the carry generation network the pair is held either in true
// (active-high) or in complemented (active-low) form; which form a level uses
// alternates from level to level, see ppa_carry_generation.
package ppa_pkg;

  // Group generate / group propagate pair of one prefix node.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
