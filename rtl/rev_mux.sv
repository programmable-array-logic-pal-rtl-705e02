// rev_mux: 2:1 reversible multiplexer made of a single Fredkin gate.
//
// The select E drives the Fredkin control, data input 0 is a constant (OFF)
// and data input 1 is X. Output Q is X when E = 1 and OFF when E = 0, so with
// OFF = 0 (the grounded input of the original fuse) the mux acts as an
// on/off switch. E is passed through on e_out and the other swapped line is a
// garbage output, g = E ? OFF : X.
// OFF defaults to 0 as in the original design; the PLD arrays instantiate it
// with OFF = 1 in AND planes (see rev_fuse), which is a choice of this RTL.
// Purely combinational.
module rev_mux #(
  parameter bit OFF = 1'b0   // value seen on Q while the switch is off
) (
  input  logic e,       // select / fuse enable
  input  logic x,       // data
  output logic e_out,   // = e (Fredkin P)
  output logic q,       // = e ? x : OFF
  output logic g        // garbage = e ? OFF : x
);
  fredkin_gate u_fr (.a(e), .b(OFF), .c(x), .p(e_out), .q(q), .r(g));
endmodule
