// unit_arbiter: two-input unit arbitration circuit of the arbitration tree.
//
// Two children (r1/a1, r2/a2) compete for one parent channel (r_out/a_in).
// All three channels are four-phase. A mutual exclusion element picks the
// child that asked first. Its grant is forwarded upward as r_out = g1 | g2.
// The parent's acknowledge is routed back to the winner through a Muller
// C-element, a1 = C(g1, a_in), so a1 falls only after both the grant and the
// parent's acknowledge have returned to zero. The request of each child is
// masked by the other child's acknowledge, m1 = r1 & ~a2. The loser therefore
// gets its grant only once the winner's four-phase cycle is fully complete,
// and the parent sees a clean new request. This structure (mutex, AND gates
// in front of it, C-elements on the acknowledges, OR gate to the parent)
// follows the published unit arbitration circuit. The exact gating
// signals are this implementation's choice.
//
// g1/g2 are brought out so that the tree can tell which leaf holds the
// token (the "select neuron" path used for address encoding).
//
// Circuit warning: the mutex and C-element latches close feedback loops
// through the masking gates. That is how a self-timed arbiter holds its
// decision.
module unit_arbiter (
  input  logic rst_n,
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  output logic r_out,
  input  logic a_in,
  output logic g1,
  output logic g2
);
  logic m1, m2;

  assign m1 = r1 & ~a2;
  assign m2 = r2 & ~a1;

  mutex2    u_mutex (.rst_n, .r1(m1), .r2(m2), .g1, .g2);
  c_element u_c1    (.rst_n, .a(g1), .b(a_in), .c(a1));
  c_element u_c2    (.rst_n, .a(g2), .b(a_in), .c(a2));

  assign r_out = g1 | g2;
endmodule
