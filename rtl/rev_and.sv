// rev_and: N-input AND built from a chain of Fredkin gates.
//
// Stage k (k = 1 .. N-1) is a Fredkin gate with control x[k], B = running
// product, C = 0: its R output is x[k] & product, which feeds the next stage.
// Stage outputs P (= x[k]) and Q (= ~x[k] & product) are garbage and are left
// unconnected. N-1 gates, N-1 constant inputs, 2(N-1) garbage outputs.
// The original design names a "reversible AND gate" without giving its
// insides; the Fredkin chain is this RTL's choice, picked because it uses
// only the gates the original design is built from. Purely combinational.
module rev_and #(
  parameter int unsigned N = 2   // number of inputs, >= 1
) (
  input  logic [N-1:0] x,
  output logic         y
);
  logic [N-1:0] acc;   // acc[k] = &x[k:0]
  assign acc[0] = x[0];
  for (genvar k = 1; k < N; k++) begin : g_stage
    fredkin_gate u_fr (.a(x[k]), .b(acc[k-1]), .c(1'b0), .p(), .q(), .r(acc[k]));
  end
  assign y = acc[N-1];
endmodule
