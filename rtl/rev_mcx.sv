// rev_mcx: n-bit controlled-NOT gate, the basic reversible gate of the adder.
//
// The target line is inverted when every control line is active; the control
// lines themselves leave the gate unchanged, so only the target is an output
// here (the gate is n x n on the circuit's lines, its controls simply continue).
// NCTRL = 0 gives the NOT gate, 1 the Feynman (CNOT) gate, 2 the Toffoli gate,
// and larger values the generalised Toffoli gate used for block-wide carry
// propagation. A control is active when 1; a bit set in NEG makes control t a
// negated control, active when 0 (drawn as an open circle in circuit diagrams).
//
// Timing: purely combinational, one gate level.
// The truth table is the standard one for the gate; the NEG mask and the NCTRL = 0 case
// folding the NOT gate into the same module are this design's choices.
module rev_mcx #(
  parameter int unsigned                              NCTRL = 2,
  parameter logic [(NCTRL > 0 ? NCTRL : 1)-1:0] NEG   = '0
) (
  input  logic [(NCTRL > 0 ? NCTRL : 1)-1:0] ctrl_i,
  input  logic                               tgt_i,
  output logic                               tgt_o
);
  logic active;

  always_comb begin
    if (NCTRL == 0) active = 1'b1;
    else            active = &(ctrl_i ^ NEG);
    tgt_o = tgt_i ^ active;
  end
endmodule
