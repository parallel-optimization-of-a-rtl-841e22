// rev_mcx_tb: exhaustive check of the n-bit controlled-NOT gate as NOT,
// Feynman, Toffoli and 4-bit gate, and with negated controls. Expected values
// come from the truth tables: the target flips exactly when all controls are
// active. Also checks that every configuration is a bijection on its lines.
module rev_mcx_tb;
  int checks = 0, failures = 0;

  logic       n_t, n_o;
  logic       f_c, f_t, f_o;
  logic [1:0] t_c;  logic t_t, t_o;
  logic [2:0] q_c;  logic q_t, q_o;
  logic [2:0] g_c;  logic g_t, g_o;

  rev_mcx #(.NCTRL(0))                u_not (.ctrl_i(1'b0), .tgt_i(n_t), .tgt_o(n_o));
  rev_mcx #(.NCTRL(1))                u_fey (.ctrl_i(f_c),  .tgt_i(f_t), .tgt_o(f_o));
  rev_mcx                             u_tof (.ctrl_i(t_c),  .tgt_i(t_t), .tgt_o(t_o));
  rev_mcx #(.NCTRL(3))                u_c4  (.ctrl_i(q_c),  .tgt_i(q_t), .tgt_o(q_o));
  rev_mcx #(.NCTRL(3), .NEG(3'b101)) u_neg (.ctrl_i(g_c),  .tgt_i(g_t), .tgt_o(g_o));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // NOT gate table: 0 -> 1, 1 -> 0.
    n_t = 0; #1 check("NOT 0", n_o, 1'b1);
    n_t = 1; #1 check("NOT 1", n_o, 1'b0);
    // Feynman gate.
    for (int v = 0; v < 4; v++) begin
      {f_c, f_t} = 2'(v); #1;
      check($sformatf("CNOT %b", 2'(v)), f_o, f_t ^ f_c);
    end
    // Toffoli gate: the 3-bit table of the n-bit controlled-NOT.
    for (int v = 0; v < 8; v++) begin
      logic [2:0] row;
      row = 3'(v);
      {t_c, t_t} = row; #1;
      check($sformatf("Toffoli %b", row), t_o, (row == 3'b110 || row == 3'b111) ? ~row[0] : row[0]);
    end
    // 4-bit gate and negated controls: control pattern 3'b010 is active for NEG=101.
    for (int v = 0; v < 16; v++) begin
      logic [3:0] row;
      row = 4'(v);
      {q_c, q_t} = row; {g_c, g_t} = row; #1;
      check($sformatf("C3NOT %b", row), q_o, row[0] ^ (row[3:1] == 3'b111));
      check($sformatf("neg C3NOT %b", row), g_o, row[0] ^ (row[3:1] == 3'b010));
    end
    // Bijection: for each control pattern the two target values map to different outputs.
    for (int v = 0; v < 8; v++) begin
      logic o0, o1;
      g_c = 3'(v); g_t = 0; #1 o0 = g_o;
      g_t = 1; #1 o1 = g_o;
      check($sformatf("bijective %b", 3'(v)), o0 ^ o1, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
