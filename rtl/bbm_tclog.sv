// Two's complement logic of the byte-slice module.
//
// Decodes the digit DJ (of y_{i+1}), which multiplies x with its own sign, and
// the digit DO (of y_1), which multiplies q with the opposite sign, per
// w <- 2(w - q*d_1 + x*d_{i+1} - d_i). Each nonzero digit gates its operand;
// a subtraction complements it and, in the low-order slice only, adds 1 at
// the least significant column. Both subtracted gives TCADJ = 2, a 1 in the
// second column. While DIGITE is high (first basic cycle) both digits count
// as zero. The illegal code 10 decodes as zero, a choice of this design.
// Combinational.
module bbm_tclog
  import feu_pkg::*;
(
  input  digit_t     do_d,    // digit of y_1
  input  digit_t     dj_d,    // digit of y_{i+1}
  input  logic       lob,     // this slice is the low-order byte
  input  logic       digite,  // first basic cycle
  output logic       gatex,
  output logic       compx,
  output logic       gateq,
  output logic       compq,
  output logic [1:0] tcadj    // carry-in value 0..2 at columns 1:0
);
  always_comb begin
    gatex = !digite && dj_d[0];
    compx = gatex && !dj_d[1];   // d_{i+1} = -1: subtract x
    gateq = !digite && do_d[0];
    compq = gateq && do_d[1];    // d_1 = +1: subtract q
    tcadj = lob ? (2'(compx) + 2'(compq)) : 2'b00;
  end
endmodule
