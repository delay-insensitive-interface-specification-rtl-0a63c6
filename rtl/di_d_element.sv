// di_d_element: Martin's D element, a four-phase handshake sequencer.
//
// What it does: it links a left handshake port (request ar, acknowledge ak)
// to a right port (request br, acknowledge bk) in this fixed order:
//     ar+ -> ak+      the left request is acknowledged at once,
//     ar- -> br+      its release starts a right handshake,
//     bk+ -> br-      the right side completes its four phases,
//     bk- -> ak-      and only then is the left acknowledge withdrawn.
// So the right handshake runs nested inside the return-to-zero half of the
// left handshake.
//
// How it works: ak alone cannot tell the state after ar+ from the state
// after bk- (both have ar = br = bk = 0 at some point with different next
// moves), so one internal state signal csc0 is added. The three gates are
//     ak   = ~csc0 | bk
//     br   = ~ar & ~csc0
//     csc0 = (~ar & csc0) | bk          (state-holding, fed back)
// csc0 is 1 at rest, falls on ar+, and is set again by bk+.
// The csc0 gate holds its value through feedback; lint tools report that
// loop as a combinational loop and it is intentional.
//
// Reset: the source gives no reset. With all inputs low, csc0 = 1 and
// csc0 = 0 are both stable, and only csc0 = 1 is the proper initial state
// (ak = br = 0). This design therefore adds an active-high rst that forces
// csc0 to 1; hold it while ar and bk are low, then release it.
//
// Interface: rst, ar, bk in; ak, br out; csc0 brought out for observation.
// Timing: no clock; each output settles in the time step of the input
// change that enables it.
//
// Follows the source: the handshake order, the three gate equations and the
// signal names. Own choice: the rst input and the csc0 output port.
module di_d_element (
  input  logic rst,
  input  logic ar,
  output logic ak,
  output logic br,
  input  logic bk,
  output logic csc0
);

  assign csc0 = rst | (~ar & csc0) | bk;
  assign ak   = ~csc0 | bk;
  assign br   = ~ar & ~csc0;

endmodule : di_d_element
