// hm_pkg -- shared types of the hybrid multiplier.
//
// The hybrid adders are built from carry-select groups, each of which uses
// one of three fast adder styles for its carry-in-0 sum. adder_kind_e names
// that style; csel_group takes it as a parameter and builds the matching
// adder. ADD_RCA is included so that a group can also use a plain ripple
// adder, although the hybrid adders of this design never ask for it.
package hm_pkg;

  typedef enum logic [1:0] {
    ADD_RCA        = 2'd0,
    ADD_HANCARLSON = 2'd1,
    ADD_LING       = 2'd2,
    ADD_WEINBERGER = 2'd3
  } adder_kind_e;

endpackage
