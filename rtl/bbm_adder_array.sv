// Adder array of the byte-slice module.
//
// Adds, column by column, the four 8-bit operands XSGND, QSGND, WSOUT and
// WCOUT, the two ZADJ bits in the top columns 7:6 and the two TCADJ bits in
// the bottom columns 1:0. The columns are taken in pairs. Each pair is counted
// by one parallel counter into a 4-bit number whose two low bits are the SUM
// bits of the pair and whose two high bits are CARRY bits two columns higher.
// The pairs with a fifth input use (5,5,4) counters, the middle pairs (4,4,4)
// counters: 20 full adders and 4 half adders in all. No carry travels from
// pair to pair, so the delay does not grow with the word length.
//
//   sum[k]   has weight 2^k      (k = 0..7)
//   carry[k] has weight 2^(k+2)  (k = 0..7); carry[7:5] leave the slice
//
// sum + carry = xs + qs + ws + wc + {zadj, 6'b0} + tcadj exactly (10 bits).
// The split into counters follows the document's choice of (5,5,4) and
// (4,4,4) counters; the gate wiring inside them is this design's own.
// Combinational.
module bbm_adder_array (
  input  logic [7:0] xs,     // XSGND
  input  logic [7:0] qs,     // QSGND
  input  logic [7:0] ws,     // WSOUT
  input  logic [7:0] wc,     // WCOUT
  input  logic [1:0] zadj,   // columns 7:6
  input  logic [1:0] tcadj,  // columns 1:0
  output logic [7:0] sum,
  output logic [7:0] carry
);
  logic [3:0] y0, y1, y2, y3;

  counter_554 u_pair0 (.a({tcadj[0], xs[0], qs[0], ws[0], wc[0]}),
                       .b({tcadj[1], xs[1], qs[1], ws[1], wc[1]}), .y(y0));
  counter_444 u_pair1 (.a({xs[2], qs[2], ws[2], wc[2]}),
                       .b({xs[3], qs[3], ws[3], wc[3]}), .y(y1));
  counter_444 u_pair2 (.a({xs[4], qs[4], ws[4], wc[4]}),
                       .b({xs[5], qs[5], ws[5], wc[5]}), .y(y2));
  counter_554 u_pair3 (.a({zadj[0], xs[6], qs[6], ws[6], wc[6]}),
                       .b({zadj[1], xs[7], qs[7], ws[7], wc[7]}), .y(y3));

  always_comb begin
    sum   = {y3[1:0], y2[1:0], y1[1:0], y0[1:0]};
    carry = {y3[3:2], y2[3:2], y1[3:2], y0[3:2]};
  end
endmodule
