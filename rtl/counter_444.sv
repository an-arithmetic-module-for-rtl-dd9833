// (4,4,4) parallel counter: y = (a0+..+a3) + 2*(b0+..+b3), at most 12.
// Four bits of one column and four of the next column up are counted into a
// 4-bit number. Built from four full adders and two half adders; the wiring
// is this design's own. Combinational.
module counter_444 (
  input  logic [3:0] a,  // column of weight 1
  input  logic [3:0] b,  // column of weight 2
  output logic [3:0] y
);
  logic s1, k1, k2, t1, t2, m1, m2, m3;
  full_adder u_fa1 (.a(a[0]), .b(a[1]), .ci(a[2]), .s(s1), .c(k1));
  half_adder u_ha1 (.a(s1),   .b(a[3]),            .s(y[0]), .c(k2));
  full_adder u_fa2 (.a(b[0]), .b(b[1]), .ci(b[2]), .s(t1), .c(m1));
  full_adder u_fa3 (.a(b[3]), .b(k1),   .ci(k2),   .s(t2), .c(m2));
  half_adder u_ha2 (.a(t1),   .b(t2),              .s(y[1]), .c(m3));
  full_adder u_fa4 (.a(m1),   .b(m2),   .ci(m3),   .s(y[2]), .c(y[3]));
endmodule
