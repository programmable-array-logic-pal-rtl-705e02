// rev_and_plane: programmable AND plane of the reversible PAL and PLA.
//
// Each input in[k] enters a Feynman gate with B = 1, which yields the true
// line (P) and the complement line (Q) without fan-out. Every literal line
// runs down the array as a chain of reversible fuses, one per product term:
// the fuse's P output carries the line on to the next term's fuse, its Q
// output feeds that term's reversible AND gate. prod[t] is the AND of the
// literals whose fuse enable en[t][col] is 1 (column 2k = in[k], 2k+1 = its
// complement). A disabled fuse contributes 1, so a term with no enabled
// fuse is constant 1 and a term with both literals of an input enabled is
// constant 0. The last P output of each column chain is a garbage output.
// The input CNOTs with their constant 1 and the fuse chains follow the
// original design; giving every crosspoint a fuse, and an off value of 1 in
// this plane, are this RTL's choices. Purely combinational.
module rev_and_plane #(
  parameter int unsigned N_IN   = 3,
  parameter int unsigned N_TERM = 5
) (
  input  logic [N_IN-1:0]                 in,
  input  logic [N_TERM-1:0][2*N_IN-1:0]   en,     // fuse enables, 1 = connected
  output logic [N_TERM-1:0]               prod
);
  localparam int unsigned N_COL = 2 * N_IN;

  logic [N_COL-1:0]             lit;    // literal lines at the top of the array
  logic [N_TERM-1:0][N_COL-1:0] line;   // fuse P outputs, down each column
  logic [N_TERM-1:0][N_COL-1:0] tap;    // fuse Q outputs, into the AND gates

  for (genvar k = 0; k < N_IN; k++) begin : g_lit
    feynman_gate u_lit (.a(in[k]), .b(1'b1), .p(lit[2*k]), .q(lit[2*k+1]));
  end

  for (genvar t = 0; t < N_TERM; t++) begin : g_term
    for (genvar c = 0; c < N_COL; c++) begin : g_col
      logic a;
      if (t == 0) begin : g_top
        assign a = lit[c];
      end else begin : g_next
        assign a = line[t-1][c];
      end
      rev_fuse #(.OFF(1'b1)) u_fuse (.a(a), .e(en[t][c]), .p(line[t][c]),
                                     .q(tap[t][c]), .e_out(), .g());
    end
    rev_and #(.N(N_COL)) u_and (.x(tap[t]), .y(prod[t]));
  end
endmodule
