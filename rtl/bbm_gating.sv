// Gating logic of the byte-slice module (one instance for x, one for q).
//
// Presents an 8-bit operand to the adder array in true form, in one's
// complement form or as zero, as a signed digit asks. The +1 that completes
// the two's complement is added separately at the low-order slice through
// TCADJ. Combinational.
module bbm_gating (
  input  logic [7:0] val,   // XOUT or QOUT
  input  logic       gate,  // 0: the operand is zero
  input  logic       comp,  // 1: complement the operand
  output logic [7:0] sgnd   // XSGND or QSGND
);
  always_comb sgnd = gate ? (comp ? ~val : val) : 8'h00;
endmodule
