// rbca_top: top level of the reversible adder design.
//
// Holds the ripple-block carry adder at its default size (16 bits, four
// blocks of four bits) and, beside it, the controlled-swap (Fredkin) gate of
// the reversible gate set, which the adder does not use and which therefore
// has ports of its own. All ports are the circuit's lines; as in the gate
// modules, a line that no gate changes (the Fredkin control) is not repeated
// as an output. The block ancilla lines are brought out so that
// their return to 0 can be observed; drive anc_i with 0.
// Timing: purely combinational.
module rbca_top
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
  output logic [M-1:0] anc_o,
  input  logic         fk_c_i,
  input  logic         fk_a_i,
  input  logic         fk_b_i,
  output logic         fk_a_o,
  output logic         fk_b_o
);
  rbca #(.N(N), .M(M)) u_adder (
    .a_i(a_i), .b_i(b_i), .anc_i(anc_i),
    .a_o(a_o), .s_o(s_o), .anc_o(anc_o)
  );

  rev_fredkin u_fredkin (
    .c_i(fk_c_i), .a_i(fk_a_i), .b_i(fk_b_i),
    .a_o(fk_a_o), .b_o(fk_b_o)
  );
endmodule
