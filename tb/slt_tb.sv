// slt_tb: exhaustive check of the S < A gate on 4-bit blocks: for every S, A
// and target value the target must become l ^ (S < A), with the bus carrying
// A ^ S.
module slt_tb;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic [K-1:0] x, a;
  logic l, lo;

  slt #(.K(K)) dut (.x_i(x), .a_i(a), .l_i(l), .l_o(lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < (1 << K); s++)
      for (int av = 0; av < (1 << K); av++)
        for (int lv = 0; lv < 2; lv++) begin
          a = K'(av); x = K'(s ^ av); l = 1'(lv);
          #1;
          checks++;
          if (lo !== (1'(lv) ^ (s < av))) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d a=%0d l=%0d: got %b", s, av, lv, lo);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
