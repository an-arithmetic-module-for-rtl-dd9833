// Test of an elementary evaluation unit (eight byte slices, row 1 of the
// system, so both p_1 and q_1 are nonzero for odd functions).
//
// p and q are loaded from the unit's ROMs, x from the argument bus, and
// random digit streams are fed to the d_1 and d_{i+1} inputs. The bench
// tracks the exact residual of the row as one 64-bit number,
//   w <- 2 * (w - d_i - q d_1 + x d_{i+1}),   w = p at start,
// with all digits counted as zero in the first cycle after start, and checks
// every clock that |w| < 2 and that the digit the unit produced agrees with
// w within the slice's truncated look-ahead: d = +1 needs w >= 1/2,
// d = -1 needs w < -1/2 + 2^-5, d = 0 needs -1/2 < w < 1/2 + 2^-5. A broken
// carry or shift between slices makes the true residual drift away from the
// estimate and fails these checks.
module tb_eeu;
  import feu_pkg::*;

  localparam int unsigned NBBM = 8;
  localparam int unsigned H    = 4;
  localparam int unsigned ROW  = 1;
  localparam int unsigned W    = 8 * NBBM;
  localparam int unsigned FR   = W - 2;

  typedef logic signed [191:0] wide_t;

  logic clk = 1'b0;
  logic [H-1:0] fsel;
  logic pq_sel, load_e, load_x, start;
  logic [W-1:0] arg;
  digit_t d_1, d_next, d_i;

  eeu #(.EEU_IDX(ROW)) dut (.clk, .fsel, .pq_sel, .load_e, .load_x, .arg, .start,
                           .d_1, .d_next, .d_i);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_tc2 = 0;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (dut.g_slice[NBBM-1].u_bbm.tcadj == 2'd2) n_tc2++;

  function automatic digit_t rand_digit();
    case ($urandom % 3)
      0: return DIG_ZERO;
      1: return DIG_NEG;
      default: return DIG_POS;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    wide_t one, w, p, q, x, lim;
    one = wide_t'(1) <<< FR;
    start = 0; load_e = 0; load_x = 0; pq_sel = 0; fsel = 0; arg = 0;
    d_1 = DIG_ZERO; d_next = DIG_ZERO;
    for (int ev = 0; ev < 64; ev++) begin
      int dprev;
      fsel = H'(ev);
      // x: |x| <= 19/128
      lim = wide_t'(19) <<< (FR - 7);
      x = wide_t'({$urandom, $urandom}) % (2 * lim + 1) - lim;
      if (ev % 8 == 1) x = lim;
      if (ev % 8 == 2) x = -lim;
      arg = W'(x);
      load_x = 1; @(posedge clk); #1;
      load_x = 0; load_e = 1; pq_sel = 1; @(posedge clk); #1;
      pq_sel = 0; @(posedge clk); #1;
      load_e = 0;
      p = wide_t'(feu_coef_pkg::coef_word(ev, ROW, 1'b1, FR));
      q = wide_t'(feu_coef_pkg::coef_word(ev, ROW, 1'b0, FR));
      start = 1; @(posedge clk); #1;
      start = 0;
      check(d_i == DIG_ZERO, "digit of weight 1 is zero");
      w = p;
      dprev = 0;
      for (int j = 1; j <= 70; j++) begin
        int dov, djv, d;
        d_1 = rand_digit();
        d_next = rand_digit();
        dov = (j == 1) ? 0 : digit_value(d_1);
        djv = (j == 1) ? 0 : digit_value(d_next);
        @(posedge clk); #1;
        w = 2 * (w - wide_t'(dprev) * one - q * wide_t'(dov) + x * wide_t'(djv));
        d = digit_value(d_i);
        if (d > 0) n_pos++;
        if (d < 0) n_neg++;
        check(d_i != 2'b10, "legal code");
        check(w < 2 * one && w > -2 * one, $sformatf("|w| < 2 (f=%0d j=%0d)", ev, j));
        if (d > 0)       check(w >= one / 2, $sformatf("d=+1 needs w >= 1/2 (f=%0d j=%0d)", ev, j));
        else if (d < 0)  check(w < -one / 2 + one / 32, $sformatf("d=-1 (f=%0d j=%0d)", ev, j));
        else             check(w > -one / 2 && w < one / 2 + one / 32, $sformatf("d=0 (f=%0d j=%0d)", ev, j));
        dprev = d;
      end
    end
    check(n_pos > 0 && n_neg > 0 && n_tc2 > 0, "coverage");
    $display("pos=%0d neg=%0d tcadj2=%0d", n_pos, n_neg, n_tc2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
