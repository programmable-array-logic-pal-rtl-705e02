// rev_pal: reversible programmable array logic (programmable AND, fixed OR).
//
// The inputs go through a programmable AND plane (rev_and_plane): Feynman
// gates make the true and complement literal lines, a reversible fuse at
// every crosspoint selects the literals of each product term, and a
// reversible AND gate forms the term. The OR plane is fixed by the OR_MAP
// parameter: wherever OR_MAP[o][t] is 1 the product row passes through a
// Feynman gate with B = 0 (the fixed connection), whose P output carries the
// row on to the next connection and whose Q output drives output o's
// reversible OR gate. Crosspoints without a connection feed the OR gate a
// constant 0. f[o] = OR over t with OR_MAP[o][t] of prod[t].
//
// Interface: in[k] is input I[k+1]; and_en[t][c] programs the AND plane
// (c = 2k: in[k], c = 2k+1: its complement); f[o] is output f(o+1); prod
// shows the product terms. Purely combinational: f settles after the gate
// delays, there is no clock.
// The CNOT fixed connections and the default sizes and OR_MAP (3 inputs,
// 5 terms, 3 outputs, the example equations of rev_pld_pkg) follow the
// original design; bringing the AND-plane programming out as a port is this
// RTL's choice.
module rev_pal
  import rev_pld_pkg::*;
#(
  parameter int unsigned N_IN   = PLD_N_IN,
  parameter int unsigned N_TERM = PLD_N_TERM,
  parameter int unsigned N_OUT  = PLD_N_OUT,
  parameter logic [N_OUT-1:0][N_TERM-1:0] OR_MAP = EXAMPLE_OR_MAP
) (
  input  logic [N_IN-1:0]                 in,
  input  logic [N_TERM-1:0][2*N_IN-1:0]   and_en,
  output logic [N_OUT-1:0]                f,
  output logic [N_TERM-1:0]               prod
);
  rev_and_plane #(.N_IN(N_IN), .N_TERM(N_TERM)) u_and_plane (
    .in(in), .en(and_en), .prod(prod));

  // Fixed OR plane: row[t][o] is product t after passing output o's column.
  logic [N_TERM-1:0][N_OUT-1:0] row;
  logic [N_OUT-1:0][N_TERM-1:0] tap;

  for (genvar t = 0; t < N_TERM; t++) begin : g_term
    for (genvar o = 0; o < N_OUT; o++) begin : g_out
      logic a;
      if (o == 0) begin : g_first
        assign a = prod[t];
      end else begin : g_next
        assign a = row[t][o-1];
      end
      if (OR_MAP[o][t]) begin : g_conn
        feynman_gate u_fixed (.a(a), .b(1'b0), .p(row[t][o]), .q(tap[o][t]));
      end else begin : g_none
        assign row[t][o] = a;
        assign tap[o][t] = 1'b0;
      end
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_or
    rev_or #(.N(N_TERM)) u_or (.x(tap[o]), .y(f[o]));
  end
endmodule
