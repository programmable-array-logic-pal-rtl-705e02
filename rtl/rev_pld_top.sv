// rev_pld_top: the three reversible programmable logic devices side by side.
//
// Holds one reversible PAL (programmable AND plane, fixed CNOT OR plane wired
// for the example equations f1..f3), one reversible PLA (both planes
// programmable) and one reversible PROM (reversible 4-to-16 decoder plus a
// programmable OR plane). The three devices share nothing: each has its own
// inputs, programming words and outputs, brought out with a pal_, pla_ or
// prom_ prefix. See rev_pld_pkg for the bit order of the programming words.
// All three are purely combinational; outputs follow the inputs after the
// gate delays. Default sizes are those of the original design's example
// (3 inputs, 5 product terms, 3 outputs; 4 address bits).
module rev_pld_top
  import rev_pld_pkg::*;
(
  // reversible PAL
  input  logic [PLD_N_IN-1:0]                   pal_in,
  input  logic [PLD_N_TERM-1:0][2*PLD_N_IN-1:0] pal_and_en,
  output logic [PLD_N_OUT-1:0]                  pal_f,
  output logic [PLD_N_TERM-1:0]                 pal_prod,
  // reversible PLA
  input  logic [PLD_N_IN-1:0]                   pla_in,
  input  logic [PLD_N_TERM-1:0][2*PLD_N_IN-1:0] pla_and_en,
  input  logic [PLD_N_OUT-1:0][PLD_N_TERM-1:0]  pla_or_en,
  output logic [PLD_N_OUT-1:0]                  pla_f,
  output logic [PLD_N_TERM-1:0]                 pla_prod,
  // reversible PROM
  input  logic [3:0]                            prom_addr,
  input  logic                                  prom_e,
  input  logic [PLD_N_OUT-1:0][15:0]            prom_or_en,
  output logic [PLD_N_OUT-1:0]                  prom_data
);
  rev_pal u_pal (.in(pal_in), .and_en(pal_and_en), .f(pal_f), .prod(pal_prod));

  rev_pla u_pla (.in(pla_in), .and_en(pla_and_en), .or_en(pla_or_en),
                 .f(pla_f), .prod(pla_prod));

  rev_prom #(.N_ADDR(4), .N_OUT(PLD_N_OUT)) u_prom (
    .addr(prom_addr), .e(prom_e), .or_en(prom_or_en), .data(prom_data));
endmodule
