// di_elements_top: the four delay-insensitive elements side by side.
//
// What it holds: Martin's D element (handshake sequencer), the JOIN
// element (C-element), the MERGE element (XOR realisation) and the
// Mutual Exclusion element (behavioural model). They are independent
// library cells, not one circuit, so nothing connects them: each keeps its
// own ports at the top, prefixed d_, j_, m_ and x_.
//
// Interface and timing: as in the individual modules. There is no clock.
// The D element needs d_rst high once while d_ar and d_bk are low; the
// JOIN element is initialised by driving j_a = j_b = 0; MERGE has no
// state; the MUTEX model starts with both grants low.
//
// Lint and synthesis report combinational loops on d_csc0 and j_c and
// latches in the MUTEX model. The loops are the state-holding gates of the
// D and JOIN elements, which are asynchronous by design; the latches belong
// to a simulation-only model (see the individual files).
//
// Own choice: which MERGE realisation the top uses. XOR is the one that is
// correct in the general two-phase environment.
module di_elements_top (
  // D element
  input  logic d_rst,
  input  logic d_ar,
  output logic d_ak,
  output logic d_br,
  input  logic d_bk,
  output logic d_csc0,
  // JOIN element
  input  logic j_a,
  input  logic j_b,
  output logic j_c,
  // MERGE element
  input  logic m_a,
  input  logic m_b,
  output logic m_c,
  // MUTEX element
  input  logic x_r0,
  input  logic x_r1,
  output logic x_g0,
  output logic x_g1
);

  di_d_element u_d_element (
    .rst (d_rst),
    .ar  (d_ar),
    .ak  (d_ak),
    .br  (d_br),
    .bk  (d_bk),
    .csc0(d_csc0)
  );

  di_join u_join (
    .a(j_a),
    .b(j_b),
    .c(j_c)
  );

  di_merge #(
    .IMPL(di_pkg::MERGE_XOR)
  ) u_merge (
    .a(m_a),
    .b(m_b),
    .c(m_c)
  );

  di_mutex u_mutex (
    .r0(x_r0),
    .r1(x_r1),
    .g0(x_g0),
    .g1(x_g1)
  );

endmodule : di_elements_top
