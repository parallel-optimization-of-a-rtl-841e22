// carry_correct_tb: exhaustive check of carry correction on a 4-bit block.
// Inputs are the lines a MAJ chain leaves when run with carry-in 0; with the
// true carry-in c the outputs must equal the lines a MAJ chain leaves when run
// with carry-in c (all worked out from integer addition), except the top A
// line, which passes unchanged. Counts how often a correction flips a line.
module carry_correct_tb;
  localparam int K = 4;
  int checks = 0, failures = 0, flips = 0;
  logic c, anc, anco;
  logic [K-1:0] a, b, p, ai, ao;

  carry_correct #(.K(K)) dut (.c_i(c), .anc_i(anc), .p_i(p), .a_i(ai), .anc_o(anco), .a_o(ao));

  function automatic logic carry(int av, int bv, int cv, int t);
    int m = (1 << t) - 1;
    return 1'(((av & m) + (bv & m) + cv) >> t);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * K + 1)); v++) begin
      logic [K-1:0] ea;
      {c, b, a} = (2 * K + 1)'(v);
      anc = a[0];
      p = a ^ b;
      for (int t = 0; t < K; t++) begin
        ai[t] = (t < K - 1) ? a[t+1] ^ carry(int'(a), int'(b), 0, t + 1)
                            : carry(int'(a), int'(b), 0, K);
        ea[t] = (t < K - 1) ? a[t+1] ^ carry(int'(a), int'(b), int'(c), t + 1) : ai[t];
      end
      #1;
      checks++;
      if (anco !== (a[0] ^ c) || ao !== ea) begin
        failures++;
        if (failures < 10)
          $display("FAIL c=%b a=%h b=%h: got anc=%b a=%h expected a=%h", c, a, b, anco, ao, ea);
      end
      if (ai[K-2:0] != ea[K-2:0]) flips++;
    end
    checks++;
    if (flips == 0) begin failures++; $display("FAIL no internal carry was corrected"); end
    $display("corrections applied: %0d", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
