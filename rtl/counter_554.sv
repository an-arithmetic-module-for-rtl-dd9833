// (5,5,4) parallel counter: y = (a0+..+a4) + 2*(b0+..+b4), at most 15.
// Five bits of one column and five of the next column up are counted into a
// 4-bit number spanning four columns. Built from six full adders; the wiring
// is this design's own. Combinational.
module counter_554 (
  input  logic [4:0] a,  // column of weight 1
  input  logic [4:0] b,  // column of weight 2
  output logic [3:0] y
);
  logic s1, k1, k2, t1, t2, m1, m2, m3;
  full_adder u_fa1 (.a(a[0]), .b(a[1]), .ci(a[2]), .s(s1),   .c(k1));
  full_adder u_fa2 (.a(s1),   .b(a[3]), .ci(a[4]), .s(y[0]), .c(k2));
  full_adder u_fa3 (.a(b[0]), .b(b[1]), .ci(b[2]), .s(t1),   .c(m1));
  full_adder u_fa4 (.a(b[3]), .b(b[4]), .ci(k1),   .s(t2),   .c(m2));
  full_adder u_fa5 (.a(t1),   .b(t2),   .ci(k2),   .s(y[1]), .c(m3));
  full_adder u_fa6 (.a(m1),   .b(m2),   .ci(m3),   .s(y[2]), .c(y[3]));
endmodule
