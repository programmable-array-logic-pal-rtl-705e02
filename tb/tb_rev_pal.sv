// tb_rev_pal: checks the reversible PAL at its default size (3 inputs,
// 5 terms, 3 outputs, fixed OR plane for the example).
//  1. Programmed with the example AND plane, all 8 input values are compared
//     with the equations f1..f3 written out directly.
//  2. 200 random AND-plane programmings with random inputs are compared with a
//     behavioural sum-of-products model of the same fixed OR plane.
//  3. With the AND plane blank every term is 1, so every output is 1.
module tb_rev_pal;
  import rev_pld_pkg::*;
  logic [2:0]        in;
  logic [4:0][5:0]   and_en;
  logic [2:0]        f;
  logic [4:0]        prod;
  int checks = 0, failures = 0;

  rev_pal dut (.in(in), .and_en(and_en), .f(f), .prod(prod));

  function automatic logic [2:0] eqns(input logic [2:0] v);
    logic i1, i2, i3;
    {i3, i2, i1} = v;
    return {(i1 & ~i3) | (i1 & i2 & i3),
            (i1 & i2) | (~i1 & i2 & i3) | (i1 & i3),
            (i1 & i2) | (i1 & ~i3) | (~i1 & i2 & i3)};
  endfunction

  function automatic logic [4:0] sop_terms(input logic [2:0] v, input logic [4:0][5:0] en);
    logic [4:0] t;
    for (int r = 0; r < 5; r++) begin
      t[r] = 1'b1;
      for (int k = 0; k < 3; k++) begin
        if (en[r][2*k]   && !v[k]) t[r] = 1'b0;
        if (en[r][2*k+1] &&  v[k]) t[r] = 1'b0;
      end
    end
    return t;
  endfunction

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s in=%b: got %b want %b", what, in, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] t;
    and_en = EXAMPLE_AND_EN;
    for (int i = 0; i < 8; i++) begin
      in = 3'(i);
      #1;
      check("f vs equations", 5'(f), 5'(eqns(in)));
    end
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 5; r++) and_en[r] = 6'($urandom);
      in = 3'($urandom);
      #1;
      t = sop_terms(in, and_en);
      check("prod", prod, t);
      check("f", 5'(f), 5'({t[1] | t[4], t[0] | t[2] | t[3], t[0] | t[1] | t[2]}));
    end
    and_en = '0;
    in = 3'b010;
    #1;
    check("blank plane", 5'(f), 5'b00111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
