// rev_fuse: the reversible programmable connection ("reversible fuse").
//
// A Feynman gate with B = 0 copies the incoming line A: one copy leaves on P
// and drives the next fuse along the same line, the other (X) enters a
// reversible 2:1 mux whose select is the programming bit E. Q therefore
// carries A when the fuse is enabled and the constant OFF when it is not.
// E is passed on (e_out) and the mux's spare output is garbage (g).
// Structure and the default OFF = 0 follow the original fuse. In AND planes
// this RTL sets OFF = 1, so that a disabled crosspoint leaves the product term
// unchanged instead of forcing it to 0; that is what lets every crosspoint of
// a full array carry a fuse. Purely combinational.
module rev_fuse #(
  parameter bit OFF = 1'b0
) (
  input  logic a,       // line being tapped
  input  logic e,       // programming bit: 1 = connected
  output logic p,       // = a, to the next fuse on the line
  output logic q,       // = e ? a : OFF, to the AND / OR gate
  output logic e_out,   // = e
  output logic g        // garbage
);
  logic x;
  feynman_gate u_copy (.a(a), .b(1'b0), .p(p), .q(x));
  rev_mux #(.OFF(OFF)) u_mux (.e(e), .x(x), .e_out(e_out), .q(q), .g(g));
endmodule
