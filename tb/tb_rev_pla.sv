// tb_rev_pla: checks the reversible PLA at its default size.
//  1. Programmed with the example (both planes), all 8 inputs are compared
//     with the equations f1..f3 written out directly.
//  2. 300 random programmings of both planes with random inputs are compared
//     with a behavioural sum-of-products model.
//  3. A PLA with 4 inputs, 6 terms and 2 outputs gets the same random test.
module tb_rev_pla;
  import rev_pld_pkg::*;
  logic [3:0]        in;
  logic [5:0][7:0]   and_en;
  logic [2:0][5:0]   or_en;
  logic [2:0]        f;
  logic [4:0]        prod;
  logic [1:0]        f_b;
  logic [5:0]        prod_b;
  int checks = 0, failures = 0;

  rev_pla dut (.in(in[2:0]), .and_en({and_en[4][5:0], and_en[3][5:0], and_en[2][5:0],
                                       and_en[1][5:0], and_en[0][5:0]}),
               .or_en({or_en[2][4:0], or_en[1][4:0], or_en[0][4:0]}),
               .f(f), .prod(prod));
  rev_pla #(.N_IN(4), .N_TERM(6), .N_OUT(2)) dut_b (
    .in(in), .and_en(and_en), .or_en(or_en[1:0]), .f(f_b), .prod(prod_b));

  function automatic logic [2:0] eqns(input logic [2:0] v);
    logic i1, i2, i3;
    {i3, i2, i1} = v;
    return {(i1 & ~i3) | (i1 & i2 & i3),
            (i1 & i2) | (~i1 & i2 & i3) | (i1 & i3),
            (i1 & i2) | (i1 & ~i3) | (~i1 & i2 & i3)};
  endfunction

  // generic model: n_in inputs, n_term terms, n_out outputs
  function automatic logic [7:0] sop(input logic [3:0] v, input logic [5:0][7:0] a_en,
                                     input logic [2:0][5:0] o_en,
                                     input int n_in, input int n_term, input int n_out,
                                     output logic [5:0] t);
    logic [7:0] y;
    t = '0;
    y = '0;
    for (int r = 0; r < n_term; r++) begin
      t[r] = 1'b1;
      for (int k = 0; k < n_in; k++) begin
        if (a_en[r][2*k]   && !v[k]) t[r] = 1'b0;
        if (a_en[r][2*k+1] &&  v[k]) t[r] = 1'b0;
      end
    end
    for (int o = 0; o < n_out; o++)
      for (int r = 0; r < n_term; r++)
        if (o_en[o][r] && t[r]) y[o] = 1'b1;
    return y;
  endfunction

  task automatic check(input string what, input logic [7:0] got, input logic [7:0] want);
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
    logic [5:0] t;
    logic [7:0] y;
    and_en = '0;
    or_en  = '0;
    for (int r = 0; r < 5; r++) and_en[r][5:0] = EXAMPLE_AND_EN[r];
    for (int o = 0; o < 3; o++) or_en[o][4:0]  = EXAMPLE_OR_MAP[o];
    for (int i = 0; i < 8; i++) begin
      in = 4'(i);
      #1;
      check("example f vs equations", 8'(f), 8'(eqns(in[2:0])));
    end
    for (int n = 0; n < 300; n++) begin
      for (int r = 0; r < 6; r++) and_en[r] = 8'($urandom);
      for (int o = 0; o < 3; o++) or_en[o] = 6'($urandom);
      in = 4'($urandom);
      #1;
      y = sop({1'b0, in[2:0]}, and_en, or_en, 3, 5, 3, t);
      check("prod", 8'(prod), 8'(t[4:0]));
      check("f", 8'(f), y);
      y = sop(in, and_en, or_en, 4, 6, 2, t);
      check("4x6x2 prod", 8'(prod_b), 8'(t));
      check("4x6x2 f", 8'(f_b), y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
