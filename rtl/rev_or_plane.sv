// rev_or_plane: programmable OR plane of the reversible PLA and PROM.
//
// Each product line runs across the outputs as a chain of reversible fuses:
// the fuse's P output carries the product on to the next output's fuse, its
// Q output feeds that output's reversible OR gate. f[o] is the OR of the
// products whose fuse enable en[o][t] is 1; a disabled fuse gives 0, the
// grounded-mux off value of the original fuse. The structure follows the
// original design. Purely combinational.
module rev_or_plane #(
  parameter int unsigned N_TERM = 5,
  parameter int unsigned N_OUT  = 3
) (
  input  logic [N_TERM-1:0]               prod,
  input  logic [N_OUT-1:0][N_TERM-1:0]    en,     // fuse enables, 1 = connected
  output logic [N_OUT-1:0]                f
);
  logic [N_OUT-1:0][N_TERM-1:0] line;   // fuse P outputs, along each product row
  logic [N_OUT-1:0][N_TERM-1:0] tap;    // fuse Q outputs, into the OR gates

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    for (genvar t = 0; t < N_TERM; t++) begin : g_term
      logic a;
      if (o == 0) begin : g_first
        assign a = prod[t];
      end else begin : g_next
        assign a = line[o-1][t];
      end
      rev_fuse #(.OFF(1'b0)) u_fuse (.a(a), .e(en[o][t]), .p(line[o][t]),
                                     .q(tap[o][t]), .e_out(), .g());
    end
    rev_or #(.N(N_TERM)) u_or (.x(tap[o]), .y(f[o]));
  end
endmodule
