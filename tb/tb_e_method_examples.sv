// The two worked examples of the method, run on 64-bit byte slices with
// random coefficients pushed to the limits of the convergence conditions.
//
//   P3(x)   = p3 x^3 + p2 x^2 + p1 x + p0                (4 rows, q = 0)
//   R23(x)  = (p2 x^2 + p1 x + p0) / (q3 x^3 + q2 x^2 + q1 x + 1)
//
// Coefficients: |p_i| <= 1/2 (often exactly +-1/2), and |q_i| + |x| <= 31/128
// (often with equality), with signs of all kinds. After m + 1 = 63 digits of
// every row the bench checks, with exact wide-integer arithmetic, the row
// residuals |b - A y*| < 2^-(m+1) and the value bound |R(x) - y1*| < 2^-m.
module tb_e_method_examples;
  import feu_pkg::*;

  localparam int unsigned NROW = 4;
  localparam int unsigned NBBM = 8;
  localparam int unsigned W    = 8 * NBBM;
  localparam int unsigned FR   = W - 2;
  localparam int unsigned M    = FR;
  localparam int          NEVAL = 400;

  typedef logic signed [1023:0] big_t;

  logic clk = 1'b0;
  logic loadx = 0, loade = 0, regls = 0, start = 0;
  logic [W-1:0] word [NROW];
  digit_t digit [NROW];

  bbm_network #(.NROW(NROW), .NBBM(NBBM)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_poly = 0, n_rat = 0, n_edge = 0;

  initial begin
    #(10 * 1000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic big_t absb(big_t v);
    return v < 0 ? -v : v;
  endfunction

  // random value in [-lim, lim] at scale 2^FR, the ends chosen often
  function automatic big_t rnd(big_t lim);
    big_t r;
    case ($urandom % 6)
      0: return lim;
      1: return -lim;
      2: return 0;
      default: begin
        r = big_t'({$urandom, $urandom}) % (2 * lim + 1);
        return r - lim;
      end
    endcase
  endfunction

  big_t x, p [NROW], q [NROW], y [NROW];

  initial begin
    big_t one, half, lim;
    one  = big_t'(1) <<< FR;
    half = one / 2;
    lim  = (big_t'(31) <<< FR) / 128;
    for (int ev = 0; ev < NEVAL; ev++) begin
      bit rat;
      rat = ev % 2 == 1;
      if (rat) n_rat++; else n_poly++;
      x = rnd(lim);
      for (int i = 0; i < NROW; i++) begin
        p[i] = rnd(half);
        if (rat && i == NROW - 1) p[i] = 0;        // R23 has no x^3 term on top
        q[i] = (rat && i > 0) ? rnd(lim - absb(x)) : 0;
        if (absb(q[i]) + absb(x) == lim) n_edge++;
      end
      // load x, p, q
      for (int i = 0; i < NROW; i++) word[i] = W'(x);
      loadx = 1; @(posedge clk); #1; loadx = 0;
      for (int i = 0; i < NROW; i++) word[i] = W'(p[i]);
      loade = 1; regls = 1; @(posedge clk); #1;
      for (int i = 0; i < NROW; i++) word[i] = W'(q[i]);
      regls = 0; @(posedge clk); #1; loade = 0;
      start = 1; @(posedge clk); #1; start = 0;
      check(digit[0] == DIG_ZERO, "first digit zero");
      for (int i = 0; i < NROW; i++) y[i] = 0;
      for (int j = 1; j <= M + 1; j++) begin
        @(posedge clk); #1;
        for (int i = 0; i < NROW; i++)
          y[i] = y[i] + (big_t'(digit_value(digit[i])) <<< (M + 1 - j));
      end
      // residuals at scale 2^(FR+M+1)
      for (int i = 0; i < NROW; i++) begin
        big_t r;
        r = (p[i] <<< (M + 1)) - (y[i] <<< FR);
        if (i > 0) r = r - q[i] * y[0];
        if (i < NROW - 1) r = r + x * y[i+1];
        check(absb(r) < one, $sformatf("residual row %0d ev %0d", i, ev));
      end
      // value: |P*2^(M+1) - y*Q| < 2|Q|, P and Q at scale 2^(FR*NROW)
      begin
        big_t xp, pp, qq, lhs;
        xp = 1;
        pp = 0;
        qq = big_t'(1) <<< (FR * NROW);
        for (int i = 0; i < NROW; i++) begin
          pp = pp + ((p[i] * xp) <<< (FR * (NROW - 1 - i)));
          if (i > 0) qq = qq + ((q[i] * xp) <<< (FR * (NROW - 1 - i)));
          xp = xp * x;
        end
        lhs = (pp <<< (M + 1)) - y[0] * qq;
        check(absb(lhs) < 2 * absb(qq), $sformatf("value ev %0d (%s)", ev, rat ? "R23" : "P3"));
      end
    end
    check(n_poly > 0 && n_rat > 0 && n_edge > 0, "coverage");
    $display("P3=%0d R23=%0d coefficients at the |q|+|x| limit=%0d", n_poly, n_rat, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
