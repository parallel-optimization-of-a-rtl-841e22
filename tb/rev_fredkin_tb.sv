// rev_fredkin_tb: exhaustive check of the controlled-swap gate against its
// truth table (A and B swap when the control is 1) and of its bijectivity,
// plus the two-control generalisation (swap only when both controls are 1).
module rev_fredkin_tb;
  int checks = 0, failures = 0;
  logic c, a, b, ao, bo;
  logic [1:0] c2;
  logic a2, b2, ao2, bo2;
  logic [7:0] seen;

  rev_fredkin dut (.c_i(c), .a_i(a), .b_i(b), .a_o(ao), .b_o(bo));
  rev_fredkin #(.NCTRL(2)) dut2 (.c_i(c2), .a_i(a2), .b_i(b2), .a_o(ao2), .b_o(bo2));

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
      logic [1:0] exp;
      {c, a, b} = 3'(v);
      #1;
      exp = c ? {b, a} : {a, b};
      checks++;
      if ({ao, bo} !== exp) begin
        failures++;
        $display("FAIL in %b: got %b expected %b", 3'(v), {ao, bo}, exp);
      end
      seen[{c, ao, bo}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL not a bijection: %b", seen);
    end
    for (int v = 0; v < 16; v++) begin
      logic [1:0] exp;
      {c2, a2, b2} = 4'(v);
      #1;
      exp = (c2 == 2'b11) ? {b2, a2} : {a2, b2};
      checks++;
      if ({ao2, bo2} !== exp) begin
        failures++;
        $display("FAIL 2-control in %b: got %b expected %b", 4'(v), {ao2, bo2}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
