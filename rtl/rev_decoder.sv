// rev_decoder: N-to-2^N decoder with enable, built as a tree of Fredkin gates.
//
// The enable E is the root of a binary tree. At level j every line L of the
// level meets a Fredkin gate whose control is address bit in[N-1-j] and whose
// inputs are B = L, C = 0: Q = ~s & L goes to the "bit is 0" child, R = s & L
// to the "bit is 1" child. The address bit itself is not fanned out: it is
// passed from gate to gate along the level through the P outputs, and the
// last P of each level is a garbage output. out[k] is 1 exactly when E = 1
// and in == k.
// Cost: 2^N - 1 Fredkin gates, 2^N - 1 constant zeros, N garbage outputs. For
// N = 2 this is the three-gate 2-to-4 decoder with three constant inputs and
// two garbage outputs of the original design; the tree extends it to any N,
// and the default N = 4 is the 4-to-16 decoder built on the same scheme.
// Which address bit is decoded first (here the MSB, so that out is indexed by
// the binary value of in) is a choice of this RTL. Purely combinational.
module rev_decoder #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]      in,
  input  logic              e,        // enable, active high
  output logic [2**N-1:0]   out,      // one-hot when e = 1, all 0 when e = 0
  output logic [N-1:0]      garbage   // garbage[b] = in[b], the end of bit b's chain
);
  // Heap-numbered tree: node 1 is the root, node n has children 2n and 2n+1.
  logic [2**(N+1)-1:1] node;
  logic [2**N-1:1]     sel;          // P output of the gate at node n

  assign node[1] = e;
  for (genvar j = 0; j < N; j++) begin : g_level
    for (genvar m = 0; m < 2**j; m++) begin : g_gate
      localparam int unsigned NODE = 2**j + m;
      logic s_in;
      if (m == 0) begin : g_first
        assign s_in = in[N-1-j];
      end else begin : g_chain
        assign s_in = sel[NODE-1];
      end
      fredkin_gate u_fr (.a(s_in), .b(node[NODE]), .c(1'b0),
                         .p(sel[NODE]), .q(node[2*NODE]), .r(node[2*NODE+1]));
    end
    assign garbage[N-1-j] = sel[2**(j+1)-1];
  end
  assign out = node[2**(N+1)-1:2**N];
endmodule
