// rev_pld_pkg: sizes and the worked example shared by the reversible PLDs.
//
// The example array has 3 inputs I[1..3], 5 product terms and 3 outputs
// f1..f3, programmed for
//   f1 = I1 I2 + I1 I3' + I1' I2 I3
//   f2 = I1 I2 + I1' I2 I3 + I1 I3
//   f3 = I1 I3' + I1 I2 I3
// with the five distinct products shared between outputs:
//   t0 = I1 I2, t1 = I1 I3', t2 = I1' I2 I3, t3 = I1 I3, t4 = I1 I2 I3.
// RTL bit in[k] is I[k+1] and f[o] is f(o+1).
// AND-plane programming words have one bit per literal column: column 2k is
// in[k] and column 2k+1 is its complement. OR-plane words have one bit per
// product term. A set bit means "connected" (fuse enable E = 1).
// The equations and array sizes are those of the original design; the
// numbering of terms and columns is this RTL's.
package rev_pld_pkg;

  localparam int unsigned PLD_N_IN   = 3;
  localparam int unsigned PLD_N_TERM = 5;
  localparam int unsigned PLD_N_OUT  = 3;

  // AND plane of the example: row t lists the literal columns of term t.
  localparam logic [PLD_N_TERM-1:0][2*PLD_N_IN-1:0] EXAMPLE_AND_EN = '{
    6'b010101,   // t4 = I1 I2 I3
    6'b010001,   // t3 = I1 I3
    6'b010110,   // t2 = I1' I2 I3
    6'b100001,   // t1 = I1 I3'
    6'b000101    // t0 = I1 I2
  };

  // OR plane of the example: row o lists the terms summed into f(o+1).
  localparam logic [PLD_N_OUT-1:0][PLD_N_TERM-1:0] EXAMPLE_OR_MAP = '{
    5'b10010,    // f3 = t1 + t4
    5'b01101,    // f2 = t0 + t2 + t3
    5'b00111     // f1 = t0 + t1 + t2
  };

endpackage
