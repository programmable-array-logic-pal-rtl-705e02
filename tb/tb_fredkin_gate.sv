// tb_fredkin_gate: exhaustive check of the Fredkin gate. With A = 0 the data
// bits pass (Q = B, R = C), with A = 1 they swap (Q = C, R = B). Also checks
// that the eight output patterns are all different (one-to-one mapping) and
// that the gate applied twice restores its inputs.
module tb_fredkin_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate inv (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      logic [2:0] want;
      {a, b, c} = 3'(i);
      #1;
      want = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== want) begin
        failures++;
        $display("FAIL abc=%b: pqr=%b%b%b want %b", {a, b, c}, p, q, r, want);
      end
      checks++;
      if ({p2, q2, r2} !== {a, b, c}) begin
        failures++;
        $display("FAIL not self-inverse for %b", {a, b, c});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
