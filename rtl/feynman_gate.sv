// feynman_gate: the 2x2 Feynman (controlled-NOT, CNOT) reversible gate.
//
// P passes A through unchanged and Q is A xor B, so the gate is its own
// inverse and maps the four input pairs one-to-one onto the four output pairs.
// The reversible PLDs use it in three roles, all set only by what is tied to B:
//   B = 0 : copy      (P = Q = A), the fan-out stage of a fuse and the fixed
//                     connection of a PAL OR plane;
//   B = 1 : literal   (P = A, Q = not A), the true/complement pair for an input.
// Function and port names follow the Feynman gate's printed equations and
// truth table. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,   // = a
  output logic q    // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
