// rbca_cfg_run: drives one rbca of size N bits / M blocks and compares it with
// integer addition. With the ancillae at 0 it must give a_o = A, s_o = (A + B)
// mod 2^N and anc_o = 0. Inputs are all pairs when 2N <= EXHAUSTIVE_BITS, else
// corner cases plus RANDOM random pairs. When 2N + M <= 20 it also runs every
// value of every input line, ancillae included, and checks that no two inputs
// give the same outputs (the circuit is reversible). With M = 1 (the plain
// CDKM adder) the ancilla acts as carry-in and a carry-in of 1 is checked too.
module rbca_cfg_run #(
  parameter int N = 16,
  parameter int M = 4,
  parameter int RANDOM = 1000,
  parameter int EXHAUSTIVE_BITS = 16
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [N-1:0] a, b, ao, so;
  logic [M-1:0] anc, anco;

  rbca #(.N(N), .M(M)) dut (.a_i(a), .b_i(b), .anc_i(anc), .a_o(ao), .s_o(so), .anc_o(anco));

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int i = 0; i < N; i += 32) r = {r, $urandom()};
    return r;
  endfunction

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv, logic cin);
    logic [N-1:0] es;
    a = av; b = bv; anc = '0; anc[0] = cin;
    #1;
    es = av + bv + N'(cin);
    checks++;
    if (ao !== av || so !== es || anco !== anc) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d M=%0d a=%h b=%h cin=%b: got s=%h a=%h anc=%b, expected s=%h",
                 N, M, av, bv, cin, so, ao, anco, es);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    if (2 * N <= EXHAUSTIVE_BITS) begin
      for (longint v = 0; v < (64'd1 << (2 * N)); v++)
        apply(N'(v >> N), N'(v), 1'b0);
    end else begin
      apply('0, '0, 1'b0);
      apply('1, '1, 1'b0);
      apply('1, N'(1), 1'b0);
      apply(N'(1), '1, 1'b0);
      apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b0);
      for (int i = 0; i < RANDOM; i++) apply(rnd(), rnd(), 1'b0);
      // Long propagate runs: B = ~A + small value.
      for (int i = 0; i < RANDOM / 4 + 1; i++) begin
        logic [N-1:0] r;
        r = rnd();
        apply(r, ~r + N'($urandom_range(0, 3)), 1'b0);
      end
    end
    if (M == 1) begin
      for (int i = 0; i < 64; i++) apply(rnd(), rnd(), 1'b1);
      apply('1, '0, 1'b1);
    end
    if (2 * N + M <= 20) begin : bij
      bit seen [int];
      int dup = 0;
      for (int v = 0; v < (1 << (2 * N + M)); v++) begin
        int o;
        {anc, b, a} = (2 * N + M)'(v);
        #1;
        o = int'({anco, so, ao});
        if (seen.exists(o)) dup++;
        seen[o] = 1'b1;
      end
      checks++;
      if (dup != 0) begin
        failures++;
        $display("FAIL N=%0d M=%0d: %0d inputs map to an output already produced", N, M, dup);
      end
    end
    done = 1;
  end
endmodule
