// tb_rev_or: exhaustive check of the Fredkin-chain OR gate for 2, 3 and 5
// inputs (5 is the width used in the default OR planes).
module tb_rev_or;
  logic [4:0] x;
  logic y2, y3, y5;
  int checks = 0, failures = 0;

  rev_or #(.N(2)) d2 (.x(x[1:0]), .y(y2));
  rev_or #(.N(3)) d3 (.x(x[2:0]), .y(y3));
  rev_or #(.N(5)) d5 (.x(x),      .y(y5));

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
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      check("or2", y2, (i % 4) != 0);
      check("or3", y3, (i % 8) != 0);
      check("or5", y5, i != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
