// rev_pla: reversible programmable logic array (programmable AND and OR).
//
// A programmable AND plane (rev_and_plane) forms N_TERM product terms from
// the true and complement literals, with a reversible fuse at every
// crosspoint; a programmable OR plane (rev_or_plane) sums any subset of the
// terms into each output, again with a reversible fuse at every crosspoint.
// Each fuse passes its line on through its P output, so no line fans out.
// f[o] = OR over t with or_en[o][t] of (AND over c with and_en[t][c] of
// literal c).
//
// Interface: in[k] is input I[k+1]; and_en[t][c] programs the AND plane
// (c = 2k: in[k], c = 2k+1: its complement); or_en[o][t] connects term t to
// output f(o+1); prod shows the product terms. Purely combinational.
// The fuse-based OR plane and the default sizes (3 inputs, 5 terms, 3
// outputs) follow the original design; the programming ports are this RTL's.
module rev_pla
  import rev_pld_pkg::*;
#(
  parameter int unsigned N_IN   = PLD_N_IN,
  parameter int unsigned N_TERM = PLD_N_TERM,
  parameter int unsigned N_OUT  = PLD_N_OUT
) (
  input  logic [N_IN-1:0]                 in,
  input  logic [N_TERM-1:0][2*N_IN-1:0]   and_en,
  input  logic [N_OUT-1:0][N_TERM-1:0]    or_en,
  output logic [N_OUT-1:0]                f,
  output logic [N_TERM-1:0]               prod
);
  rev_and_plane #(.N_IN(N_IN), .N_TERM(N_TERM)) u_and_plane (
    .in(in), .en(and_en), .prod(prod));
  rev_or_plane #(.N_TERM(N_TERM), .N_OUT(N_OUT)) u_or_plane (
    .prod(prod), .en(or_en), .f(f));
endmodule
