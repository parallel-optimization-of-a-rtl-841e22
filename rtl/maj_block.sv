// maj_block: the k-bit MAJ chain of one adder block (left half of a CDKM adder).
//
// Bit t runs a MAJ circuit on (carry line, B_t, A_t). The carry-in line c_i is
// the carry line of bit 0; afterwards the A_t line holds C_{t+1} and serves as
// the carry line of bit t+1, where the next MAJ turns it into A_{t+1} ^ C_{t+1}.
// On exit:
//   c_o      = C_0 ^ A_0
//   b_o[t]   = A_t ^ B_t
//   a_o[t]   = A_{t+1} ^ C_{t+1}   for t < K-1
//   a_o[K-1] = C_K, the carry out of the block
// In the ripple-block adder every block runs its chain at the same time with a
// carry-in line of 0, so C_t here are the block-local carries.
//
// Timing: combinational; the carry ripples through K MAJ circuits.
// Structure follows the published CDKM adder circuit.
module maj_block #(
  parameter int unsigned K = 4
) (
  input  logic         c_i,
  input  logic [K-1:0] b_i,
  input  logic [K-1:0] a_i,
  output logic         c_o,
  output logic [K-1:0] b_o,
  output logic [K-1:0] a_o
);
  // carry[t] is the line entering bit t as its C line; carry[K] is C_K.
  logic [K:0]   carry;
  logic [K-1:0] cx;   // what bit t leaves on its C line: C_t ^ A_t

  assign carry[0] = c_i;

  for (genvar t = 0; t < K; t++) begin : g_bit
    rev_maj u_maj (
      .c_i(carry[t]), .b_i(b_i[t]), .a_i(a_i[t]),
      .c_o(cx[t]),    .b_o(b_o[t]), .a_o(carry[t+1])
    );
  end

  // Line bookkeeping: the C line of bit t+1 is the A line of bit t.
  assign c_o = cx[0];
  for (genvar t = 0; t < K; t++) begin : g_out
    if (t < K - 1) begin : g_mid
      assign a_o[t] = cx[t+1];
    end else begin : g_last
      assign a_o[t] = carry[K];
    end
  end
endmodule
