// Function evaluation unit (FEU): evaluates a polynomial or rational function
// of the argument x digit by digit with the E-method.
//
// R(x) = P(x)/Q(x) is recast as a lower-bidiagonal-plus-first-column linear
// system A y = b of order NEEU, whose first unknown y_1 is R(x). EEU i keeps
// the scaled residual of row i and produces the signed digits of y_i, most
// significant first, one per clock. All EEUs work in parallel; they exchange
// only their latest digits: every EEU receives d_1 (from EEU 1) and d_{i+1}
// (from its right neighbour). EEU 1's d_1 input and the last EEU's d_{i+1}
// input are tied to zero.
//
// Operation: one clock with load_x = 1 (argument bus -> x holding registers),
// one with load_e = 1 and pq_sel = 1 (p from the ROMs of function fsel), one
// with load_e = 1 and pq_sel = 0 (q), in any order, then a clock with
// start = 1. On the following clocks d1 gives the digits of y_1 with weights
// 1 (always 0), 1/2, 1/4, ... For m result digits hold start low for m + 1
// clocks after the start clock; the holding registers may be reloaded with
// the next function's data meanwhile. |y_1 - sum d_j 2^-j| < 2^-m holds when
// |p_i| <= 1/2 and |q_i| + |x| <= 31/128. digits brings out the digits of all
// y_i (EEU i on bits 2i+1:2i); that output is this design's addition.
//
// Defaults: nine EEUs (rational functions up to degree 8) of eight byte slices
// (64-bit words), as in the document; H is this design's choice.
module feu
  import feu_pkg::*;
#(
  parameter int unsigned NEEU = 9,  // order of the linear system
  parameter int unsigned NBBM = 8,  // byte slices per EEU
  parameter int unsigned H    = 4   // function select bits
) (
  input  logic              clk,
  input  logic [H-1:0]      fsel,
  input  logic              pq_sel,
  input  logic              load_e,
  input  logic              load_x,
  input  logic [8*NBBM-1:0] arg,
  input  logic              start,
  output digit_t            d1,
  output logic [2*NEEU-1:0] digits
);
  digit_t dig [NEEU];

  for (genvar e = 0; e < NEEU; e++) begin : g_eeu
    digit_t d_1_in, d_next_in;
    assign d_1_in    = (e == 0) ? DIG_ZERO : dig[0];
    assign d_next_in = (e == NEEU - 1) ? DIG_ZERO : dig[(e + 1) % NEEU];

    eeu #(.NBBM(NBBM), .H(H), .EEU_IDX(e)) u_eeu (
      .clk, .fsel, .pq_sel, .load_e, .load_x, .arg, .start,
      .d_1(d_1_in), .d_next(d_next_in), .d_i(dig[e]));

    assign digits[2*e +: 2] = dig[e];
  end

  assign d1 = dig[0];
endmodule
