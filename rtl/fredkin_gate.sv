// fredkin_gate: the 3x3 Fredkin (controlled-swap) reversible gate.
//
// A is the control and passes to P. With A = 0 the data bits go straight
// through (Q = B, R = C); with A = 1 they are swapped (Q = C, R = B). No
// information is lost, so the gate is reversible and self-inverse. Tying one
// data input to a constant turns it into the building blocks used here:
//   B = 0        : R = A & C          (AND, garbage Q)
//   C = 1        : Q = ~A & B | A = A | B   (OR, garbage R)
//   B = 0, C = X : Q = A & X          (the grounded 2:1 mux of the fuse)
// The swap behaviour follows the gate's written description; a printed
// output equation that gives R the same value as Q is read as a misprint for
// R = A'C + AB. Purely combinational.
module fredkin_gate (
  input  logic a,   // control
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = a ? c : b
  output logic r    // = a ? b : c
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
