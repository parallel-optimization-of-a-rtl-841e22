// rev_maj: majority (MAJ) circuit of the CDKM ripple-carry adder, one bit.
//
// Three lines (C_i, B_i, A_i) pass through three reversible gates in order:
//   1. CNOT, control A, target B    -> B line holds A_i ^ B_i
//   2. CNOT, control A, target C    -> C line holds C_i ^ A_i
//   3. Toffoli, controls C and B, target A -> A line holds the carry C_{i+1}
// because A ^ (C^A)(A^B) is the majority of A, B and C. The carry line then
// becomes the C line of the next bit's MAJ.
//
// Timing: combinational, three gate levels. Gate order and line order follow
// the published MAJ circuit.
module rev_maj (
  input  logic c_i,
  input  logic b_i,
  input  logic a_i,
  output logic c_o,
  output logic b_o,
  output logic a_o
);
  rev_mcx #(.NCTRL(1)) u_cnot_ab (.ctrl_i(a_i),        .tgt_i(b_i), .tgt_o(b_o));
  rev_mcx #(.NCTRL(1)) u_cnot_ac (.ctrl_i(a_i),        .tgt_i(c_i), .tgt_o(c_o));
  rev_mcx #(.NCTRL(2)) u_toffoli (.ctrl_i({c_o, b_o}), .tgt_i(a_i), .tgt_o(a_o));
endmodule
