// tb_rev_pld_top: end-to-end test of the three reversible PLDs at their
// default sizes (the top has no parameters).
//  - PAL and PLA are both programmed with the example equations and swept over
//    all inputs; both must match f1..f3 written out directly.
//  - Both are then reprogrammed at random (PAL: AND plane; PLA: both planes)
//    and compared with a behavioural sum-of-products model.
//  - The PROM is loaded with the truth table of f1..f3 (so all three devices
//    implement the same functions) and then with random words; every address
//    is read with the enable high and low.
// Mechanisms counted, each must occur at least once: an AND-plane fuse that is
// off removing a literal that is 0 (term stays 1); an OR-plane fuse that is
// off blocking a true term; a fixed CNOT connection carrying a true term; one
// product term feeding two outputs at once; a PROM read with the enable low.
module tb_rev_pld_top;
  import rev_pld_pkg::*;
  logic [2:0]       pal_in, pla_in;
  logic [4:0][5:0]  pal_and_en, pla_and_en;
  logic [2:0][4:0]  pla_or_en;
  logic [2:0]       pal_f, pla_f, prom_data;
  logic [4:0]       pal_prod, pla_prod;
  logic [3:0]       prom_addr;
  logic             prom_e;
  logic [2:0][15:0] prom_or_en;
  logic [2:0]       mem [16];

  int checks = 0, failures = 0;
  int n_and_fuse_off = 0, n_or_fuse_off = 0, n_fixed_conn = 0, n_shared = 0;
  int n_prom_off = 0;

  rev_pld_top dut (.*);

  function automatic logic [2:0] eqns(input logic [2:0] v);
    logic i1, i2, i3;
    {i3, i2, i1} = v;
    return {(i1 & ~i3) | (i1 & i2 & i3),
            (i1 & i2) | (~i1 & i2 & i3) | (i1 & i3),
            (i1 & i2) | (i1 & ~i3) | (~i1 & i2 & i3)};
  endfunction

  function automatic logic [4:0] terms(input logic [2:0] v, input logic [4:0][5:0] en);
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

  function automatic logic [2:0] sums(input logic [4:0] t, input logic [2:0][4:0] m);
    logic [2:0] y;
    for (int o = 0; o < 3; o++) y[o] = |(t & m[o]);
    return y;
  endfunction

  // count a disabled AND fuse whose literal is 0 (it would have killed the term)
  function automatic int and_off_hits(input logic [2:0] v, input logic [4:0][5:0] en);
    int h = 0;
    for (int r = 0; r < 5; r++)
      for (int k = 0; k < 3; k++) begin
        if (!en[r][2*k]   && !v[k]) h++;
        if (!en[r][2*k+1] &&  v[k]) h++;
      end
    return h;
  endfunction

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %b want %b", what, got, want);
    end
  endtask

  task automatic settle_and_check_pals();
    logic [4:0] tp, tl;
    #1;
    tp = terms(pal_in, pal_and_en);
    tl = terms(pla_in, pla_and_en);
    check("PAL prod", pal_prod, tp);
    check("PAL f", 5'(pal_f), 5'(sums(tp, EXAMPLE_OR_MAP)));
    check("PLA prod", pla_prod, tl);
    check("PLA f", 5'(pla_f), 5'(sums(tl, pla_or_en)));
    if (|(tp & (EXAMPLE_OR_MAP[0] | EXAMPLE_OR_MAP[1] | EXAMPLE_OR_MAP[2]))) n_fixed_conn++;
    for (int r = 0; r < 5; r++) begin
      int users = 0;
      for (int o = 0; o < 3; o++) if (tp[r] && EXAMPLE_OR_MAP[o][r]) users++;
      if (users >= 2) n_shared++;
      for (int o = 0; o < 3; o++) if (tl[r] && !pla_or_en[o][r]) n_or_fuse_off++;
    end
    n_and_fuse_off += and_off_hits(pal_in, pal_and_en) + and_off_hits(pla_in, pla_and_en);
  endtask

  task automatic prom_sweep();
    for (int i = 0; i < 32; i++) begin
      {prom_e, prom_addr} = 5'(i);
      #1;
      check("PROM data", 5'(prom_data), 5'(prom_e ? mem[prom_addr] : 3'b000));
      if (!prom_e) n_prom_off++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example programming in all three devices
    pal_and_en = EXAMPLE_AND_EN;
    pla_and_en = EXAMPLE_AND_EN;
    pla_or_en  = EXAMPLE_OR_MAP;
    for (int w = 0; w < 16; w++) begin
      mem[w] = eqns(3'(w));          // address bits 3 unused: two copies of the table
      for (int b = 0; b < 3; b++) prom_or_en[b][w] = mem[w][b];
    end
    for (int i = 0; i < 8; i++) begin
      pal_in = 3'(i);
      pla_in = 3'(i);
      settle_and_check_pals();
      check("PAL vs equations", 5'(pal_f), 5'(eqns(pal_in)));
      check("PLA vs equations", 5'(pla_f), 5'(eqns(pla_in)));
    end
    prom_sweep();

    // random programming
    for (int n = 0; n < 500; n++) begin
      for (int r = 0; r < 5; r++) begin
        pal_and_en[r] = 6'($urandom);
        pla_and_en[r] = 6'($urandom);
      end
      for (int o = 0; o < 3; o++) pla_or_en[o] = 5'($urandom);
      pal_in = 3'($urandom);
      pla_in = 3'($urandom);
      settle_and_check_pals();
    end
    for (int n = 0; n < 10; n++) begin
      for (int w = 0; w < 16; w++) begin
        mem[w] = 3'($urandom);
        for (int b = 0; b < 3; b++) prom_or_en[b][w] = mem[w][b];
      end
      prom_sweep();
    end

    $display("mechanisms: and_fuse_off=%0d or_fuse_off=%0d fixed_connection=%0d shared_term=%0d prom_disabled=%0d",
             n_and_fuse_off, n_or_fuse_off, n_fixed_conn, n_shared, n_prom_off);
    if (n_and_fuse_off == 0) begin failures++; $display("FAIL no AND fuse-off case"); end
    if (n_or_fuse_off == 0)  begin failures++; $display("FAIL no OR fuse-off case"); end
    if (n_fixed_conn == 0)   begin failures++; $display("FAIL no fixed-connection case"); end
    if (n_shared == 0)       begin failures++; $display("FAIL no shared-term case"); end
    if (n_prom_off == 0)     begin failures++; $display("FAIL no disabled PROM read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
