// rev_maj_tb: exhaustive check of the MAJ circuit: (C, B, A) must become
// (C^A, A^B, majority(A, B, C)), and the 8 input rows must map to 8 distinct
// outputs.
module rev_maj_tb;
  int checks = 0, failures = 0;
  logic c, b, a, co, bo, ao;
  logic [7:0] seen;

  rev_maj dut (.c_i(c), .b_i(b), .a_i(a), .c_o(co), .b_o(bo), .a_o(ao));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      int sum;
      {c, b, a} = 3'(v);
      #1;
      sum = int'(a) + int'(b) + int'(c);
      exp = {c ^ a, a ^ b, sum >= 2};
      checks++;
      if ({co, bo, ao} !== exp) begin
        failures++;
        $display("FAIL cba=%b: got %b expected %b", 3'(v), {co, bo, ao}, exp);
      end
      seen[{co, bo, ao}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
