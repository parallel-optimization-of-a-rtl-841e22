// rev_ums: unmajority-and-sum (UMS) circuit of the CDKM adder, one bit.
//
// Takes the three lines a MAJ left behind, (C_i ^ A_i, A_i ^ B_i, C_{i+1}),
// and passes them through three gates:
//   1. Toffoli, controls C and B lines, target A line -> A line back to A_i
//   2. CNOT, control A, target C                      -> C line back to C_i
//   3. CNOT, control C, target B                      -> B line holds S_i
// S_i = A_i ^ B_i ^ C_i. This is the two-CNOT form in which the last CNOT of the
// plain unmajority circuit and the first CNOT of the sum circuit cancel.
//
// Timing: combinational, three gate levels. Gate order follows the published UMS circuit.
module rev_ums (
  input  logic c_i,
  input  logic b_i,
  input  logic a_i,
  output logic c_o,
  output logic b_o,
  output logic a_o
);
  rev_mcx #(.NCTRL(2)) u_toffoli (.ctrl_i({c_i, b_i}), .tgt_i(a_i), .tgt_o(a_o));
  rev_mcx #(.NCTRL(1)) u_cnot_ac (.ctrl_i(a_o),        .tgt_i(c_i), .tgt_o(c_o));
  rev_mcx #(.NCTRL(1)) u_cnot_cb (.ctrl_i(c_o),        .tgt_i(b_i), .tgt_o(b_o));
endmodule
