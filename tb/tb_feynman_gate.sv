// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate against its
// truth table (A B -> P Q: 00->00, 01->01, 10->11, 11->10), entered here as a
// constant table rather than computed, plus a check that applying the gate
// twice returns the inputs (reversibility).
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;
  // truth table rows indexed by {a,b}: value {p,q}
  localparam logic [1:0] TT [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut  (.a(a), .b(b), .p(p), .q(q));
  feynman_gate inv  (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== TT[i]) begin
        failures++;
        $display("FAIL a=%b b=%b: p q = %b%b, want %b", a, b, p, q, TT[i]);
      end
      checks++;
      if ({p2, q2} !== {a, b}) begin
        failures++;
        $display("FAIL gate applied twice does not restore %b%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
