// tb_rev_decoder: checks the Fredkin-tree decoder at the default 4-to-16 size
// and at the 2-to-4 size. For every address and both enable values the output
// must be one-hot at the address (enable 1) or all zero (enable 0); the
// garbage outputs must repeat the address bits. The 2-to-4 outputs are also
// compared with a hand-written table.
module tb_rev_decoder;
  logic [3:0]  in4;
  logic [1:0]  in2;
  logic        e;
  logic [15:0] out4;
  logic [3:0]  out2, g4;
  logic [1:0]  g2;
  int checks = 0, failures = 0;
  // 2-to-4 decoder with enable, index {e, in}
  localparam logic [3:0] DEC2 [8] = '{4'b0000, 4'b0000, 4'b0000, 4'b0000,
                                      4'b0001, 4'b0010, 4'b0100, 4'b1000};

  rev_decoder            d4 (.in(in4), .e(e), .out(out4), .garbage(g4));
  rev_decoder #(.N(2))   d2 (.in(in2), .e(e), .out(out2), .garbage(g2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {e, in4} = 5'(i);
      in2 = in4[1:0];
      #1;
      checks++;
      if (out4 !== (e ? 16'(1) << in4 : 16'h0)) begin
        failures++;
        $display("FAIL 4-to-16 e=%b in=%0d out=%h", e, in4, out4);
      end
      checks++;
      if (g4 !== in4) begin
        failures++;
        $display("FAIL 4-to-16 garbage %b in %b", g4, in4);
      end
      checks++;
      if (out2 !== DEC2[{e, in2}] || g2 !== in2) begin
        failures++;
        $display("FAIL 2-to-4 e=%b in=%b out=%b garbage=%b", e, in2, out2, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
