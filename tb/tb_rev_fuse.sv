// tb_rev_fuse: checks the reversible fuse. P always repeats A (the line goes
// on to the next fuse); Q is A when the fuse is programmed (E = 1) and the
// off value otherwise. Tested for both off values and for a chain of three
// fuses on one line, as in the arrays.
module tb_rev_fuse;
  logic a, e;
  logic [2:0] ec;
  logic p0, q0, eo0, g0, p1, q1, eo1, g1;
  logic [2:0] cp, cq;
  int checks = 0, failures = 0;

  rev_fuse             dut0 (.a(a), .e(e), .p(p0), .q(q0), .e_out(eo0), .g(g0));
  rev_fuse #(.OFF(1)) dut1 (.a(a), .e(e), .p(p1), .q(q1), .e_out(eo1), .g(g1));

  // a chain of three fuses along one line
  rev_fuse c0 (.a(a),     .e(ec[0]), .p(cp[0]), .q(cq[0]), .e_out(), .g());
  rev_fuse c1 (.a(cp[0]), .e(ec[1]), .p(cp[1]), .q(cq[1]), .e_out(), .g());
  rev_fuse c2 (.a(cp[1]), .e(ec[2]), .p(cp[2]), .q(cq[2]), .e_out(), .g());

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%b e=%b ec=%b: got %b want %b", what, a, e, ec, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ec = '0;
    for (int i = 0; i < 4; i++) begin
      {a, e} = 2'(i);
      #1;
      check("p", p0, a);
      check("q off=0", q0, e ? a : 1'b0);
      check("e_out", eo0, e);
      check("p off=1", p1, a);
      check("q off=1", q1, e ? a : 1'b1);
    end
    for (int i = 0; i < 16; i++) begin
      {a, ec} = 4'(i);
      #1;
      for (int k = 0; k < 3; k++) begin
        check("chain q", cq[k], ec[k] & a);
        check("chain p", cp[k], a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
