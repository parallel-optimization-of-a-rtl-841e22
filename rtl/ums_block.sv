// ums_block: the k-bit UMS chain of one adder block (right half of a CDKM adder).
//
// The inverse ripple of maj_block: starting from the top bit, bit t runs a UMS
// circuit on (C_t ^ A_t line, A_t ^ B_t, C_{t+1} line). UMS restores the C_{t+1}
// line to A_t, writes S_t onto the B line and restores its C line to C_t; that
// line is the A_{t-1} line, which is then the carry input of bit t-1.
// Inputs are laid out as maj_block leaves them (after carry correction in the
// ripple-block adder):
//   c_i = C_0 ^ A_0,  b_i[t] = A_t ^ B_t,
//   a_i[t] = A_{t+1} ^ C_{t+1} for t < K-1,  a_i[K-1] = C_K.
// Outputs: c_o = C_0, s_o = sum bits, a_o = the A bits.
//
// Timing: combinational; K UMS circuits in series, top bit first.
// Structure follows the published CDKM adder circuit.
module ums_block #(
  parameter int unsigned K = 4
) (
  input  logic         c_i,
  input  logic [K-1:0] b_i,
  input  logic [K-1:0] a_i,
  output logic         c_o,
  output logic [K-1:0] s_o,
  output logic [K-1:0] a_o
);
  // cline[t]: value on bit t's C line when its UMS runs (C_t ^ A_t);
  // carry[t]: C_t after bit t's UMS restored it; carry[K] = C_K.
  logic [K-1:0] cline;
  logic [K:0]   carry;

  assign carry[K] = a_i[K-1];

  for (genvar t = 0; t < K; t++) begin : g_bit
    if (t == 0) begin : g_first
      assign cline[t] = c_i;
    end else begin : g_rest
      assign cline[t] = a_i[t-1];
    end
    rev_ums u_ums (
      .c_i(cline[t]), .b_i(b_i[t]), .a_i(carry[t+1]),
      .c_o(carry[t]), .b_o(s_o[t]), .a_o(a_o[t])
    );
  end

  assign c_o = carry[0];
endmodule
