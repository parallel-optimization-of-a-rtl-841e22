// rbca_top_tb: end-to-end test of the top level at its default size
// (16-bit adder in four 4-bit blocks, plus the Fredkin gate).
// Every addition is compared with integer addition; A and all ancilla lines
// must come back unchanged (ancillae 0). Operands are corner cases, operands
// built to drive each mechanism of the adder, and random pairs. From the
// reference carries the test counts how often each mechanism is exercised:
//   ripple   - a block's true carry-out differs from its local one (the
//              block-carry Toffoli fires)
//   correct  - carry correction flips an internal carry line of a block
//   equal    - the uncomputation gate removes a C_i (A == S) term
//   slt      - an slt gate clears a 1 from an ancilla line
//   wrap     - the carry out of the top bit is dropped (sum mod 2^16)
//   swap     - the Fredkin gate exchanges two different values
// A mechanism never seen counts as a failure.
module rbca_top_tb;
  import rbca_pkg::*;
  localparam int N = ADDER_BITS;
  localparam int M = ADDER_BLOCKS;
  localparam int K = N / M;
  localparam int RANDOM = 200000;

  int checks = 0, failures = 0;
  int n_ripple = 0, n_correct = 0, n_equal = 0, n_slt = 0, n_wrap = 0, n_swap = 0;

  logic [N-1:0] a, b, ao, so;
  logic [M-1:0] anc, anco;
  logic fc, fa, fb, fao, fbo;

  rbca_top dut (
    .a_i(a), .b_i(b), .anc_i(anc), .a_o(ao), .s_o(so), .anc_o(anco),
    .fk_c_i(fc), .fk_a_i(fa), .fk_b_i(fb), .fk_a_o(fao), .fk_b_o(fbo)
  );

  // Carry into bit t of A + B (carry-in 0), t = 0..N.
  function automatic logic carry(logic [N-1:0] av, logic [N-1:0] bv, int t);
    logic [N:0] m, s;
    m = (N+1)'((65'd1 << t) - 65'd1);
    s = ({1'b0, av} & m) + ({1'b0, bv} & m);
    return s[t];
  endfunction

  // Carry out of block j when the block starts from carry-in cin.
  function automatic logic block_cout(logic [K-1:0] av, logic [K-1:0] bv, logic cin);
    logic [K:0] s;
    s = {1'b0, av} + {1'b0, bv} + (K+1)'(cin);
    return s[K];
  endfunction

  task automatic count_mechanisms(logic [N-1:0] av, logic [N-1:0] bv);
    logic [N-1:0] sv;
    sv = av + bv;
    for (int j = 0; j < M; j++) begin
      logic [K-1:0] ab, bb, sb;
      logic cin;
      ab = av[j*K +: K]; bb = bv[j*K +: K]; sb = sv[j*K +: K];
      cin = carry(av, bv, j * K);
      if (j >= 1 && block_cout(ab, bb, 1'b0) != block_cout(ab, bb, cin)) n_ripple++;
      if (j >= 1 && cin && (ab[0] ^ bb[0])) n_correct++;
      if (j >= 1 && j <= M - 2 && cin && sb == ab) n_equal++;
      if (j <= M - 2 && sb < ab) n_slt++;
    end
    if (carry(av, bv, N)) n_wrap++;
  endtask

  task automatic apply(logic [N-1:0] av, logic [N-1:0] bv);
    logic [N-1:0] es;
    a = av; b = bv; anc = '0;
    #1;
    es = av + bv;
    checks++;
    if (ao !== av || so !== es || anco !== '0) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h: got s=%h a=%h anc=%b, expected s=%h", av, bv, so, ao, anco, es);
    end
    count_mechanisms(av, bv);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fredkin gate, every input.
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {fc, fa, fb} = 3'(v);
      #1;
      exp = fc ? {fb, fa} : {fa, fb};
      checks++;
      if ({fao, fbo} !== exp) begin
        failures++;
        $display("FAIL fredkin %b: got %b", 3'(v), {fao, fbo});
      end
      if (fc && (fa != fb)) n_swap++;
    end

    // Corner cases.
    apply('0, '0);
    apply('1, '1);
    apply('1, N'(1));
    apply(N'(1), '1);
    apply(N'(16'h8000), N'(16'h8000));
    // A carry made in block 0 that rides through all the other blocks.
    apply(N'(16'hfff1), N'(16'h000f));
    // Block 1 receives a carry and has A == S (B block all ones, C = 1).
    apply(N'(16'h0a5f), N'(16'h00f1));
    for (int i = 0; i < RANDOM; i++) apply(N'($urandom()), N'($urandom()));

    $display("mechanisms: ripple=%0d correct=%0d equal=%0d slt=%0d wrap=%0d swap=%0d",
             n_ripple, n_correct, n_equal, n_slt, n_wrap, n_swap);
    if (n_ripple == 0)  begin failures++; $display("FAIL block-carry ripple never exercised"); end
    if (n_correct == 0) begin failures++; $display("FAIL carry correction never exercised"); end
    if (n_equal == 0)   begin failures++; $display("FAIL equality uncomputation never exercised"); end
    if (n_slt == 0)     begin failures++; $display("FAIL slt never cleared a carry"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL overflow never exercised"); end
    if (n_swap == 0)    begin failures++; $display("FAIL Fredkin swap never exercised"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
