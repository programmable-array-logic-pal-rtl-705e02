// tb_rev_prom: checks the reversible PROM at its default size (4 address
// bits, 3 data bits). Random contents are loaded into the OR-plane fuses and
// every address is read with the enable high (data = stored word) and low
// (data = 0). Repeated for 20 random contents.
module tb_rev_prom;
  logic [3:0]        addr;
  logic              e;
  logic [2:0][15:0]  or_en;
  logic [2:0]        data;
  logic [2:0]        mem [16];
  int checks = 0, failures = 0;

  rev_prom dut (.addr(addr), .e(e), .or_en(or_en), .data(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int w = 0; w < 16; w++) begin
        mem[w] = 3'($urandom);
        for (int b = 0; b < 3; b++) or_en[b][w] = mem[w][b];
      end
      for (int i = 0; i < 32; i++) begin
        {e, addr} = 5'(i);
        #1;
        checks++;
        if (data !== (e ? mem[addr] : 3'b000)) begin
          failures++;
          $display("FAIL e=%b addr=%0d data=%b want %b", e, addr, data,
                   e ? mem[addr] : 3'b000);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
