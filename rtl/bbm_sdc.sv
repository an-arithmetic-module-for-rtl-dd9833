// Sign digit compensation of the byte-slice module.
//
// Subtracts the slice's own previous digit d_i by feeding two bits into the
// top two columns of the adder array. In the XX.XXXXXX format -1 is
// 11.000000 and +1 is 01.000000, so the bits to add are exactly the digit
// code (11 for d = +1, 01 for d = -1). Only the high-order slice adds them.
// Combinational.
module bbm_sdc
  import feu_pkg::*;
(
  input  logic       hob,   // this slice is the high-order byte
  input  digit_t     dout,  // previous digit of this EEU
  output logic [1:0] zadj   // bits for columns 7:6
);
  always_comb zadj = hob ? dout : 2'b00;
endmodule
