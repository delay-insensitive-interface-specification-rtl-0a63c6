// di_merge: MERGE element.
//
// What it does: every transition on input a or on input b produces one
// transition on output c. The environment must not change a and b
// concurrently (it waits for c before the next input transition).
//
// How it works: in its general two-phase environment the element is an
// XOR gate, c = a ^ b. If the environment is more restrictive and always
// returns an input to 0 (waiting for c each time) before it raises either
// input again, so that a and b are never high together, the cheaper OR
// gate c = a | b behaves the same way. IMPL selects the gate; XOR is the
// default because it is correct in every environment the XOR version
// accepts, the OR version only in the restricted one.
//
// Interface: inputs a, b; output c. Purely combinational, no clock, no
// reset.
//
// Follows the source: the XOR realisation and the OR realisation for the
// restricted environment. Own choice: folding the two into one module with
// a typed parameter.
module di_merge
  import di_pkg::*;
#(
  parameter merge_impl_e IMPL = MERGE_XOR
) (
  input  logic a,
  input  logic b,
  output logic c
);

  if (IMPL == MERGE_OR) begin : g_or
    assign c = a | b;
  end else begin : g_xor
    assign c = a ^ b;
  end

endmodule : di_merge
