// Checking environment for the function evaluation unit at any size.
//
// Instantiates one feu with the given NEEU and NBBM and runs NEVAL
// evaluations through it, cycling over the 16 functions, with the same
// checks as the full-size bench: the exact residual of every row,
// |b - A y*| < 2^-(m+1); the error bound |P(x)/Q(x) - y_1*| < 2^-m, also for
// results cut short; the first digit being 0; m + 1 digits in m + 1 clocks;
// and coverage of the LOAD X override, reloading during a computation, START
// held high, polynomial and rational functions and both digit signs. Here m
// is the number of fraction bits of a word, 8*NBBM - 2. It raises done when
// finished and reports its check and failure counts on its outputs.
module feu_check_env
  import feu_pkg::*;
#(
  parameter int unsigned NEEU  = 4,
  parameter int unsigned NBBM  = 2,
  parameter int unsigned NEVAL = 40
) (
  output logic done,
  output int   n_checks,
  output int   n_failures
);
  localparam int unsigned H    = 4;
  localparam int unsigned W    = 8 * NBBM;
  localparam int unsigned FR   = W - 2;
  localparam int unsigned M    = FR;         // result digits

  typedef logic signed [1023:0] big_t;

  logic              clk = 1'b0;
  logic [H-1:0]      fsel;
  logic              pq_sel, load_e, load_x, start;
  logic [W-1:0]      arg;
  digit_t            d1;
  logic [2*NEEU-1:0] digits;

  feu #(.NEEU(NEEU), .NBBM(NBBM), .H(H)) dut (.clk, .fsel, .pq_sel, .load_e, .load_x, .arg, .start, .d1, .digits);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_override = 0, n_overlap = 0, n_hold = 0, n_poly = 0, n_rat = 0;
  int n_pos = 0, n_neg = 0, n_tc2 = 0, n_prec = 0;
  int cycles = 0;

  always @(posedge clk) cycles <= cycles + 1;

  assign n_checks   = checks;
  assign n_failures = failures;

  function automatic big_t coef(int unsigned f, int unsigned i, bit is_p);
    return big_t'(feu_coef_pkg::coef_word(f, i, is_p, FR));
  endfunction

  function automatic big_t absb(big_t v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // loads for one function: x, p, q in the given order (one clock each)
  logic [W-1:0] x_next;
  int unsigned  f_next;

  task automatic drive_load(int step, int order);
    int kind;
    kind = (order + step) % 3;
    fsel   = H'(f_next);
    load_x = (kind == 0);
    load_e = (kind != 0);
    pq_sel = (kind == 1);
    arg    = x_next;
    // LOAD X together with LOAD E: x must be loaded, p and q left alone
    if (kind == 0 && ($urandom % 2 == 1)) begin
      load_e = 1'b1;
      pq_sel = 1'($urandom);
      n_override++;
    end
  endtask

  task automatic idle_inputs();
    load_x = 1'b0;
    load_e = 1'b0;
    pq_sel = 1'($urandom);
    fsel   = H'($urandom);
    arg    = W'({$urandom, $urandom});
  endtask

  function automatic logic [W-1:0] pick_x(int unsigned f);
    longint unsigned lim, r;
    // |x| <= 31/128 for polynomials, 19/128 for the rational set
    lim = (f % 2 == 1) ? ((64'd19 << FR) >> 7) : ((64'd31 << FR) >> 7);
    r = {$urandom, $urandom};
    case ($urandom % 8)
      0: return W'(lim);
      1: return W'(-lim);
      2: return '0;
      default: begin
        r = r % (2 * lim + 1);
        return W'(r - lim);
      end
    endcase
  endfunction

  big_t y [NEEU];   // y_i* scaled by 2^(M+1)

  initial begin
    int unsigned f_cur;
    logic [W-1:0] x_cur;
    int order;
    bit preloaded;
    int t_start;

    done = 1'b0;
    idle_inputs();
    start = 1'b0;
    check($bits(arg) == W, "argument width");
    preloaded = 1'b0;
    f_next = 0;
    x_next = pick_x(0);
    repeat (3) tick();

    for (int ev = 0; ev < NEVAL; ev++) begin
      int hold;
      if (!preloaded) begin
        order = $urandom % 3;
        for (int s = 0; s < 3; s++) begin
          drive_load(s, order);
          tick();
        end
        idle_inputs();
      end
      f_cur = f_next;
      x_cur = x_next;
      if (f_cur % 2 == 1) n_rat++; else n_poly++;

      // start, sometimes held for several clocks
      hold = ($urandom % 4 == 0) ? 2 + $urandom % 3 : 1;
      if (hold > 1) n_hold++;
      start = 1'b1;
      for (int h = 0; h < hold; h++) begin
        tick();
        check(d1 == DIG_ZERO, "first digit (weight 1) is zero");
      end
      start = 1'b0;
      t_start = cycles;

      // next function: chosen now, loaded during this computation half the time
      f_next = (ev + 1) % (2 ** H);
      x_next = pick_x(f_next);
      preloaded = ($urandom % 2 == 1);
      order = $urandom % 3;
      if (preloaded) n_overlap++;

      for (int i = 0; i < NEEU; i++) y[i] = 0;
      for (int j = 1; j <= M + 1; j++) begin
        if (preloaded && j <= 3) drive_load(j - 1, order);
        else idle_inputs();
        tick();
        for (int i = 0; i < NEEU; i++) begin
          digit_t d;
          d = digits[2*i +: 2];
          check(d != 2'b10, "legal digit code");
          y[i] = y[i] + (big_t'(digit_value(d)) <<< (M + 1 - j));
          if (digit_value(d) > 0) n_pos++;
          if (digit_value(d) < 0) n_neg++;
        end
        check(d1 == digits[1:0], "d1 equals digits of EEU 1");
        // precision set by the number of clocks: j digits give error < 2^-(j-1)
        if ((j == 5 || j == 9 || j == 25) && j < M + 1) begin
          check(value_ok(f_cur, x_cur, y[0] >>> (M + 1 - j), j - 1), "short result value");
          n_prec++;
        end
      end
      idle_inputs();
      // latency: m + 1 digits in the m + 1 clocks after the start clock
      check(cycles - t_start == int'(M) + 1, "m + 1 clocks for m + 1 digits");

      // residual of every row: b_i - (A y*)_i at scale 2^(FR+M+1)
      for (int i = 0; i < NEEU; i++) begin
        big_t r;
        r = coef(f_cur, i, 1'b1) <<< (M + 1);
        r = r - (y[i] <<< FR);
        if (i > 0) r = r - coef(f_cur, i, 1'b0) * y[0];
        if (int'(i) < int'(NEEU) - 1) r = r + big_t'($signed(x_cur)) * y[i+1];
        check(absb(r) < (big_t'(1) <<< FR), $sformatf("residual row %0d f=%0d", i, f_cur));
      end
      check(value_ok(f_cur, x_cur, y[0], M), $sformatf("value f=%0d", f_cur));
    end

    check(n_override > 0, "LOAD X override exercised");
    if (NEVAL > 1) check(n_overlap > 0, "load during computation exercised");
    check(n_hold > 0, "START held exercised");
    check(n_poly > 0 && n_rat > 0, "polynomial and rational exercised");
    // with one row y_1 = p_0 = 1/2 for every function: no -1 digit occurs
    if (NEEU > 1) check(n_pos > 0 && n_neg > 0, "both digit signs exercised");
    check(n_prec > 0, "short results exercised");
    $display("NEEU=%0d NBBM=%0d: override=%0d overlap=%0d hold=%0d poly=%0d rat=%0d pos=%0d neg=%0d prec=%0d checks=%0d failures=%0d",
             NEEU, NBBM, n_override, n_overlap, n_hold, n_poly, n_rat, n_pos, n_neg, n_prec, checks, failures);
    done = 1'b1;
  end

  // |P(x)/Q(x) - yv / 2^(m+1)| < 2^-m, i.e. |P*2^(m+1) - yv*Q| < 2|Q|, with
  // P and Q exact at scale 2^(FR*NEEU).
  function automatic bit value_ok(int unsigned f, logic [W-1:0] xw, big_t yv, int unsigned m);
    big_t xp, pp, qq, lhs;
    xp = 1;
    pp = 0;
    qq = big_t'(1) <<< (FR * NEEU);
    for (int unsigned i = 0; i < NEEU; i++) begin
      pp = pp + ((coef(f, i, 1'b1) * xp) <<< (FR * (NEEU - 1 - i)));
      if (i > 0) qq = qq + ((coef(f, i, 1'b0) * xp) <<< (FR * (NEEU - 1 - i)));
      xp = xp * big_t'($signed(xw));
    end
    lhs = (pp <<< (m + 1)) - yv * qq;
    return absb(lhs) < 2 * absb(qq);
  endfunction
endmodule
