// di_mutex: Mutual Exclusion element -- behavioural model, not synthesizable.
//
// What it does: two clients each run a four-phase handshake, request rN and
// grant gN (r0+ -> g0+, r0- -> g0-; likewise r1/g1). At most one grant is
// high at any time. A request that arrives while the other client holds
// its grant waits until that grant has been withdrawn.
//
// Why a model: a real mutex must resolve the metastability of two requests
// arriving together, which needs an analog filter stage after a
// cross-coupled latch; it has no gate-level logic description. This model
// reproduces the element's behaviour at its ports for simulation only.
//
// How the model works: whenever a request changes, it waits GRANT_DELAY time
// units, then (1) withdraws a grant whose request has gone low, and
// (2) if no grant is high, grants a single pending request. When both
// requests are pending and free, the tie goes to the client that did not
// win the previous tie, standing in for the random outcome of metastability
// resolution. An immediate assertion checks mutual exclusion.
//
// Synthesis tools that drop the delays infer latches for g0, g1 and the
// tie bit from this block; that is expected of a simulation model and is
// not a circuit to build.
//
// Interface: r0, r1 in; g0, g1 out; both grants start low.
// Timing: a grant rises or falls GRANT_DELAY time units after the request
// change that causes it (own choice; the source gives no timing).
module di_mutex #(
  parameter int unsigned GRANT_DELAY = 1
) (
  input  logic r0,
  input  logic r1,
  output logic g0,
  output logic g1
);

  logic last_tie_to_1;

  initial begin
    g0            = 1'b0;
    g1            = 1'b0;
    last_tie_to_1 = 1'b0;
  end

  always @(r0 or r1) begin
    #(GRANT_DELAY);
    if (g0 && !r0) g0 = 1'b0;
    if (g1 && !r1) g1 = 1'b0;
    if (!g0 && !g1) begin
      if (r0 && r1) begin
        if (last_tie_to_1) g0 = 1'b1;
        else               g1 = 1'b1;
        last_tie_to_1 = !last_tie_to_1;
      end else if (r0) begin
        g0 = 1'b1;
      end else if (r1) begin
        g1 = 1'b1;
      end
    end
  end

  always_comb begin
    assert (!(g0 && g1)) else $error("di_mutex: both grants high");
  end

endmodule : di_mutex
