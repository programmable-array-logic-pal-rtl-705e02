// tb_rev_mux: checks the Fredkin-based 2:1 mux with its grounded input
// (Q = X when E = 1, 0 when E = 0; E passed through; garbage = ~E & X) and
// the variant with the off value tied to 1.
module tb_rev_mux;
  logic e, x;
  logic eo0, q0, g0, eo1, q1, g1;
  int checks = 0, failures = 0;

  rev_mux             dut0 (.e(e), .x(x), .e_out(eo0), .q(q0), .g(g0));
  rev_mux #(.OFF(1)) dut1 (.e(e), .x(x), .e_out(eo1), .q(q1), .g(g1));

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s e=%b x=%b: got %b want %b", what, e, x, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {e, x} = 2'(i);
      #1;
      check("q (off=0)", q0, e & x);
      check("e_out (off=0)", eo0, e);
      check("garbage (off=0)", g0, ~e & x);
      check("q (off=1)", q1, e ? x : 1'b1);
      check("garbage (off=1)", g1, e ? 1'b1 : x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
