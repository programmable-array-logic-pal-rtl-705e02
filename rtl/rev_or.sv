// rev_or: N-input OR built from a chain of Fredkin gates.
//
// Stage k (k = 1 .. N-1) is a Fredkin gate with control x[k], B = running
// sum, C = 1: its Q output is x[k] | sum (x[k] = 1 swaps the constant 1 onto
// Q), which feeds the next stage. Outputs P and R are garbage and are left
// unconnected. N-1 gates, N-1 constant inputs, 2(N-1) garbage outputs.
// The original design names a "reversible OR gate" without giving its
// insides; the Fredkin chain is this RTL's choice. Purely combinational.
module rev_or #(
  parameter int unsigned N = 2   // number of inputs, >= 1
) (
  input  logic [N-1:0] x,
  output logic         y
);
  logic [N-1:0] acc;   // acc[k] = |x[k:0]
  assign acc[0] = x[0];
  for (genvar k = 1; k < N; k++) begin : g_stage
    fredkin_gate u_fr (.a(x[k]), .b(acc[k-1]), .c(1'b1), .p(), .q(acc[k]), .r());
  end
  assign y = acc[N-1];
endmodule
