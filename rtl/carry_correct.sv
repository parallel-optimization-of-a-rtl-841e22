// carry_correct: carry correction (CC) of one block of the ripple-block adder.
//
// The block's MAJ chain ran with a carry-in of 0, so its lines hold local
// carries iC_t. With the true carry into the block c_i = C_i known, the true
// internal carries follow from the carry-correction lemma:
//   C_{i+t+1} = C_i (A_i^B_i)(A_{i+1}^B_{i+1})...(A_{i+t}^B_{i+t}) ^ iC_{i+t+1}.
// The block's gates, all controlled by c_i:
//   CNOT c_i -> ancilla line:                   A_i         -> A_i ^ C_i
//   generalised Toffoli (c_i, p_i[0..t]) -> a_i[t], t = 0..K-2:
//                                              A_{i+t+1} ^ iC_{i+t+1} -> A_{i+t+1} ^ C_{i+t+1}
// p_i are the block's A ^ B lines. a_i[K-1] holds the block carry-out, which
// the separate block-carry ripple gate already corrected; it passes unchanged.
// The control lines c_i and p_i are not changed and are not outputs.
// The gates have distinct targets and no target is a control, so they all act
// in one gate level.
//
// Timing: combinational, one gate level. Gate structure follows the published
// carry-correction circuit.
module carry_correct #(
  parameter int unsigned K = 4
) (
  input  logic         c_i,
  input  logic         anc_i,
  input  logic [K-1:0] p_i,
  input  logic [K-1:0] a_i,
  output logic         anc_o,
  output logic [K-1:0] a_o
);
  rev_mcx #(.NCTRL(1)) u_cnot_anc (.ctrl_i(c_i), .tgt_i(anc_i), .tgt_o(anc_o));

  for (genvar t = 0; t < K; t++) begin : g_line
    if (t < K - 1) begin : g_fix
      rev_mcx #(.NCTRL(t + 2)) u_fix (
        .ctrl_i({c_i, p_i[t:0]}), .tgt_i(a_i[t]), .tgt_o(a_o[t])
      );
    end else begin : g_carry
      assign a_o[t] = a_i[t];
    end
  end
endmodule
