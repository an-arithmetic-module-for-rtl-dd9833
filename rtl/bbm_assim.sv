// Assimilation logic of the byte-slice module.
//
// Forms the non-redundant 8-bit value of the new residual byte: the doubled
// sum vector (low seven SUM bits with SHIN below them) plus the doubled carry
// vector (low five CARRY bits with the three CIN bits below them). The carry
// out of the 8-bit addition is dropped. Lower slices are not looked at beyond
// SHIN and CIN, so in the high-order slice the result is w truncated to six
// fraction bits, less by under 2^-5. It is meaningful only there. A plain
// adder, as the document chose. Combinational.
module bbm_assim (
  input  logic [6:0] sum_lo,    // SUM[6:0]
  input  logic [4:0] carry_lo,  // CARRY bits of weight 2^2..2^6
  input  logic       shin,      // top SUM bit of the next lower slice
  input  logic [2:0] cin,       // top CARRY bits of the next lower slice
  output logic [7:0] result     // XX.XXXXXX in the high-order slice
);
  always_comb result = {sum_lo, shin} + {carry_lo, cin};
endmodule
