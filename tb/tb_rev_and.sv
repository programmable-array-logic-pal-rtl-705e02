// tb_rev_and: exhaustive check of the Fredkin-chain AND gate for 2, 3 and 6
// inputs (6 is the width used in the default AND plane).
module tb_rev_and;
  logic [5:0] x;
  logic y2, y3, y6;
  int checks = 0, failures = 0;

  rev_and #(.N(2)) d2 (.x(x[1:0]), .y(y2));
  rev_and #(.N(3)) d3 (.x(x[2:0]), .y(y3));
  rev_and #(.N(6)) d6 (.x(x),      .y(y6));

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s x=%b: got %b want %b", what, x, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      #1;
      check("and2", y2, (i % 4) == 3);
      check("and3", y3, (i % 8) == 7);
      check("and6", y6, i == 63);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
