// maj_block_tb: exhaustive check of the 4-bit MAJ chain. For every A, B and
// carry-in the expected lines are worked out from integer addition: the carry
// into bit t is (A mod 2^t + B mod 2^t + c) >> t.
module maj_block_tb;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic c, co;
  logic [K-1:0] a, b, ao, bo;

  maj_block #(.K(K)) dut (.c_i(c), .b_i(b), .a_i(a), .c_o(co), .b_o(bo), .a_o(ao));

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
      #1;
      for (int t = 0; t < K; t++)
        ea[t] = (t < K - 1) ? a[t+1] ^ carry(int'(a), int'(b), int'(c), t + 1)
                            : carry(int'(a), int'(b), int'(c), K);
      checks++;
      if (co !== (c ^ a[0]) || bo !== (a ^ b) || ao !== ea) begin
        failures++;
        if (failures < 10)
          $display("FAIL c=%b a=%h b=%h: got c=%b b=%h a=%h, expected a=%h", c, a, b, co, bo, ao, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
