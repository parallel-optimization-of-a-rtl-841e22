// rbca: reversible n-bit ripple-block carry adder with m blocks of k = n/m bits.
//
// Computes (A, B, 0) -> (A, A + B mod 2^n, 0) with only reversible gates and
// one ancilla line per block, which returns to 0. A plain CDKM ripple-carry
// adder is slow because the carry passes through all n bits twice; here the n
// bits are cut into m blocks that work in parallel, and only one gate per
// block sits on the long carry path. Stages, in circuit order:
//   1. MAJ chains: every block runs a k-bit MAJ chain with its ancilla line
//      (0) as carry-in, giving the block-local carry out  iC_{i+k}.
//   2. Block-carry ripple: for block j = 1..m-1 one generalised Toffoli with
//      controls C_i (true carry out of block j-1) and the block's k A^B lines
//      flips its local carry-out into the true carry-out C_{i+k}.
//   3. Carry correction (carry_correct, blocks 1..m-1, all in parallel): the
//      internal carry lines and the ancilla line receive their C_i terms.
//   4. UMS chains: every block runs a k-bit UMS chain, producing S and A and
//      leaving C_i (the block's true carry-in) on its ancilla line.
//   5. Uncomputation of the block carries, using
//      C_j = C_i (A_{i..j-1} == S_{i..j-1}) ^ (S_{i..j-1} < A_{i..j-1}):
//      a. CNOT A -> S on blocks 0..m-2, so those lines hold A ^ S;
//      b. for j = m-1 down to 2: generalised Toffoli with control C on block
//         j-1's ancilla and negated controls on block j-1's A^S lines,
//         target block j's ancilla; this removes the (A == S) term (highest
//         block first, so each control is read before it is itself changed);
//         block 1 needs none because C_0 = 0;
//      c. slt on blocks 0..m-2 clears block j+1's ancilla;
//      d. CNOT A -> (A ^ S) on blocks 0..m-2 restores S.
// The carry out of bit n-1 is uncomputed by the last block's UMS chain, so the
// sum is taken modulo 2^n. With m = 1 the circuit is the plain CDKM adder,
// and then anc_i[0] acts as a carry-in.
//
// Interface: a_i/b_i/anc_i are the circuit's input lines, a_o/s_o/anc_o its
// output lines; anc_i must be 0 for the ancillae to return to 0 and
// for s_o to be A + B. Timing: purely combinational.
// Stages, gate types and their order follow the published ripple-block
// adder circuit; the slt inside and the ancilla-as-port interface are this design's choices.
module rbca
  import rbca_pkg::*;
#(
  parameter int unsigned N = ADDER_BITS,
  parameter int unsigned M = ADDER_BLOCKS
) (
  input  logic [N-1:0] a_i,
  input  logic [N-1:0] b_i,
  input  logic [M-1:0] anc_i,
  output logic [N-1:0] a_o,
  output logic [N-1:0] s_o,
  output logic [M-1:0] anc_o
);
  localparam int unsigned K = N / M;

  initial begin
    assert (M >= 1 && N % M == 0) else $error("rbca: M must divide N");
  end

  typedef logic [M-1:0][K-1:0] bus_t;

  bus_t av, bv;
  assign av = a_i;
  assign bv = b_i;

  // Stage 1: MAJ chains, all blocks in parallel.
  logic [M-1:0] anc1;
  bus_t         p1, a1;
  for (genvar j = 0; j < M; j++) begin : g_maj
    maj_block #(.K(K)) u_maj (
      .c_i(anc_i[j]), .b_i(bv[j]), .a_i(av[j]),
      .c_o(anc1[j]),  .b_o(p1[j]), .a_o(a1[j])
    );
  end

  // Stage 2: block-carry ripple. cout[j] is the true carry out of block j.
  logic [M-1:0] cout;
  assign cout[0] = a1[0][K-1];
  for (genvar j = 1; j < M; j++) begin : g_ripple
    rev_mcx #(.NCTRL(K + 1)) u_ripple (
      .ctrl_i({cout[j-1], p1[j]}), .tgt_i(a1[j][K-1]), .tgt_o(cout[j])
    );
  end

  // Stage 3: carry correction, blocks 1..m-1 in parallel.
  logic [M-1:0] anc3;
  bus_t         a3;
  assign anc3[0] = anc1[0];
  for (genvar j = 0; j < M; j++) begin : g_cc
    logic [K-1:0] a_fixed;
    if (j == 0) begin : g_first
      assign a_fixed = a1[0];
    end else begin : g_rest
      carry_correct #(.K(K)) u_cc (
        .c_i(cout[j-1]), .anc_i(anc1[j]), .p_i(p1[j]), .a_i(a1[j]),
        .anc_o(anc3[j]), .a_o(a_fixed)
      );
    end
    // The top A line of every block carries its true carry out.
    for (genvar t = 0; t < K; t++) begin : g_bit
      if (t < K - 1) begin : g_mid
        assign a3[j][t] = a_fixed[t];
      end else begin : g_top
        assign a3[j][t] = cout[j];
      end
    end
  end

  // Stage 4: UMS chains, all blocks in parallel.
  logic [M-1:0] anc4;
  bus_t         s4, a4;
  for (genvar j = 0; j < M; j++) begin : g_ums
    ums_block #(.K(K)) u_ums (
      .c_i(anc3[j]), .b_i(p1[j]), .a_i(a3[j]),
      .c_o(anc4[j]), .s_o(s4[j]), .a_o(a4[j])
    );
  end

  // Stage 5a: CNOT A -> S on blocks 0..m-2.
  bus_t x5;
  for (genvar j = 0; j < M; j++) begin : g_axs
    for (genvar t = 0; t < K; t++) begin : g_bit
      if (j < M - 1) begin : g_xor
        rev_mcx #(.NCTRL(1)) u_cnot (.ctrl_i(a4[j][t]), .tgt_i(s4[j][t]), .tgt_o(x5[j][t]));
      end else begin : g_keep
        assign x5[j][t] = s4[j][t];
      end
    end
  end

  // Stage 5b: remove the C_i (A == S) term from the ancillae of blocks 2..m-1.
  // Each gate reads block j-1's ancilla before the gate for block j-1 runs.
  // Control 0 (the carry line) is plain, the K bus controls are negated.
  localparam logic [K:0] NEG_BUS = {1'b0, {K{1'b1}}};
  logic [M-1:0] anc5;
  for (genvar j = 0; j < M; j++) begin : g_eq
    if (j >= 2) begin : g_gate
      rev_mcx #(.NCTRL(K + 1), .NEG(NEG_BUS)) u_eq (
        .ctrl_i({anc4[j-1], x5[j-1]}), .tgt_i(anc4[j]), .tgt_o(anc5[j])
      );
    end else begin : g_keep
      assign anc5[j] = anc4[j];
    end
  end

  // Stage 5c: slt clears block j+1's ancilla from block j's lines.
  logic [M-1:0] anc6;
  assign anc6[0] = anc5[0];
  for (genvar j = 0; j < M - 1; j++) begin : g_slt
    slt #(.K(K)) u_slt (.x_i(x5[j]), .a_i(a4[j]), .l_i(anc5[j+1]), .l_o(anc6[j+1]));
  end

  // Stage 5d: CNOT A -> (A ^ S) restores S on blocks 0..m-2.
  bus_t s7;
  for (genvar j = 0; j < M; j++) begin : g_sxa
    for (genvar t = 0; t < K; t++) begin : g_bit
      if (j < M - 1) begin : g_xor
        rev_mcx #(.NCTRL(1)) u_cnot (.ctrl_i(a4[j][t]), .tgt_i(x5[j][t]), .tgt_o(s7[j][t]));
      end else begin : g_keep
        assign s7[j][t] = x5[j][t];
      end
    end
  end

  assign a_o   = a4;
  assign s_o   = s7;
  assign anc_o = anc6;
endmodule
