// slt: "S less than A" gate used to uncompute block carries.
//
// Inputs are the A ^ S lines and the A lines of one k-bit block and a single
// target line. The gate recovers S = (A ^ S) ^ A, compares the two k-bit
// unsigned values and xors (S < A) into the target: l_o = l_i ^ (S < A).
// By the carry-sum dependency lemma, C_k = C_0 (A == S) ^ (S < A); after the
// (A == S) term has been removed, this gate clears the carry line to 0.
// The bus lines are not changed and are not outputs.
//
// The published circuit specifies this gate's function but not its inside; this version is
// a plain magnitude comparator, the simplest circuit with that function.
// Timing: combinational.
module slt #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] x_i,
  input  logic [K-1:0] a_i,
  input  logic         l_i,
  output logic         l_o
);
  logic [K-1:0] s;

  always_comb begin
    s   = x_i ^ a_i;
    l_o = l_i ^ (s < a_i);
  end
endmodule
