// ums_block_tb: exhaustive check of the 4-bit UMS chain. For every A, B and
// carry-in it is fed the lines a MAJ chain leaves (worked out from integer
// addition) and must return C0, the sum (A + B + C0) mod 16 and A.
module ums_block_tb;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic c, ci, co;
  logic [K-1:0] a, b, ai, bi, so, ao;

  ums_block #(.K(K)) dut (.c_i(ci), .b_i(bi), .a_i(ai), .c_o(co), .s_o(so), .a_o(ao));

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
      logic [K-1:0] es;
      {c, b, a} = (2 * K + 1)'(v);
      ci = c ^ a[0];
      bi = a ^ b;
      for (int t = 0; t < K; t++)
        ai[t] = (t < K - 1) ? a[t+1] ^ carry(int'(a), int'(b), int'(c), t + 1)
                            : carry(int'(a), int'(b), int'(c), K);
      es = K'(int'(a) + int'(b) + int'(c));
      #1;
      checks++;
      if (co !== c || so !== es || ao !== a) begin
        failures++;
        if (failures < 10)
          $display("FAIL c=%b a=%h b=%h: got c=%b s=%h a=%h", c, a, b, co, so, ao);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
