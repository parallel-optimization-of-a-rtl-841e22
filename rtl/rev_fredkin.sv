// rev_fredkin: controlled-swap (Fredkin) gate and its n-bit generalisation.
//
// When every control line is 1 the lines A and B are exchanged, otherwise they
// pass straight through: with one control, R_A = ~C&A | C&B and
// R_B = C&A | ~C&B. NCTRL = 1 is the 3 x 3 Fredkin gate; larger NCTRL gives
// the n-bit controlled swap with n = NCTRL + 2 lines. As in the other gate
// modules, the control lines pass through unchanged and are not outputs.
// The gate belongs to the reversible gate set; the adder does not use it.
//
// Timing: purely combinational, one gate level. The truth table is the
// published one; generalising with an AND of all controls follows the way the
// controlled-NOT gate is generalised.
module rev_fredkin #(
  parameter int unsigned NCTRL = 1
) (
  input  logic [NCTRL-1:0] c_i,
  input  logic             a_i,
  input  logic             b_i,
  output logic             a_o,
  output logic             b_o
);
  logic swap;

  always_comb begin
    swap = &c_i;
    a_o  = swap ? b_i : a_i;
    b_o  = swap ? a_i : b_i;
  end
endmodule
