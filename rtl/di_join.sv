// di_join: JOIN element (Muller C-element).
//
// What it does: the output c makes one transition only after both inputs a
// and b have made one. Seen as levels, c copies the inputs when they agree
// and keeps its old value while they differ. Used as a synchronisation
// point: a two-phase (transition) request on a and one on b produce one
// transition on c.
//
// How it works: a single complex gate with its output fed back,
//     c = b(a + c) + ac
// which is the equation synthesised for this element in its JOIN
// environment. The feedback of c into its own gate is the state-holding
// loop of the C-element; it is intentional and is the reason lint tools
// report a combinational loop on c. There is no clock and no reset: with
// a = b = 0 the equation forces c = 0, so driving both inputs low
// initialises the element.
//
// Interface: inputs a, b; output c. All signals are level wires.
// Timing: purely combinational with feedback; c settles in the same
// simulation time step as the input change that enables it.
//
// Follows the source: the gate equation and the port names a, b, c.
// Own choice: initialising through the inputs instead of a reset pin.
module di_join (
  input  logic a,
  input  logic b,
  output logic c
);

  assign c = (b & (a | c)) | (a & c);

endmodule : di_join
