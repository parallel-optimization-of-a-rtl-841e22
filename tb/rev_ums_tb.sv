// rev_ums_tb: exhaustive check of the UMS circuit. For every (A, B, C) it is
// given the lines a MAJ circuit leaves, (C^A, A^B, carry), and must return
// (C, S, A) with S = A^B^C. Also checks it is a bijection on all 8 line values.
module rev_ums_tb;
  int checks = 0, failures = 0;
  logic c, b, a, co, bo, ao;
  logic [7:0] seen;

  rev_ums dut (.c_i(c), .b_i(b), .a_i(a), .c_o(co), .b_o(bo), .a_o(ao));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic ca, ba, aa;
      int sum;
      {ca, ba, aa} = 3'(v);  // C, B, A of the addition
      sum = int'(aa) + int'(ba) + int'(ca);
      c = ca ^ aa; b = aa ^ ba; a = (sum >= 2);
      #1;
      checks++;
      if ({co, bo, ao} !== {ca, 1'(sum & 1), aa}) begin
        failures++;
        $display("FAIL CBA=%b: got %b", 3'(v), {co, bo, ao});
      end
    end
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v); #1;
      seen[{co, bo, ao}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
