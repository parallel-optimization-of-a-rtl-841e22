// rbca_pkg: sizes shared by the ripple-block carry adder and its top level.
// The adder is drawn as 16 bits split into four blocks of four bits; these
// are the default sizes. Any n that m divides is accepted by the RTL.
package rbca_pkg;
  localparam int unsigned ADDER_BITS   = 16;  // n
  localparam int unsigned ADDER_BLOCKS = 4;   // m, so k = n/m bits per block
endpackage
