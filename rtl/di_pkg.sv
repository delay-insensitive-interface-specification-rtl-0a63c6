// di_pkg: shared types for the delay-insensitive element library.
//
// The MERGE element has two gate-level realisations, chosen by the
// environment it is used in (see di_merge.sv). merge_impl_e names them so
// that a parent can pick one with a typed parameter.
package di_pkg;

  // MERGE_XOR: output toggles on every input transition (two-phase use,
  //            the general case).
  // MERGE_OR:  cheaper OR gate, correct only when each input completes a
  //            full up/down pair before the other input is used.
  typedef enum logic [0:0] {
    MERGE_XOR = 1'b0,
    MERGE_OR  = 1'b1
  } merge_impl_e;

endpackage : di_pkg
