// Test of the byte-slice module against a cycle-level model of one slice.
//
// Four slices, one per HOB/LOB combination, share random inputs: load
// controls, IEB, START (sometimes held), digit inputs DO/DJ in all codes
// except the illegal one, and random SHIN/CIN from a virtual lower slice.
// The model keeps the slice's residual byte as one number, w = WS + WC
// modulo 256, and applies, every clock without START,
//   w <- 2 * (w + zadj*64 + gated x + gated q + tcadj) + shin + cin
// with x added as d_{i+1} * x and q as -d_1 * q (one's complement plus the
// carry-in in the LOB slice), zadj = -d_i in the HOB slice, digits forced to
// zero in the first cycle after START, and the next digit chosen from w by
// the +-1/2 thresholds. DOUT must equal the model digit every clock, so the
// holding/active registers, LOADX override, the START timing and the doubling
// with SHIN/CIN are all checked through it.
module tb_bbm;
  import feu_pkg::*;

  logic clock = 1'b0;
  logic loadx, loade, regls, start;
  logic [7:0] ieb;
  digit_t do_d, dj_d;
  logic [2:0] cin;
  logic shin;

  digit_t     dout  [4];
  logic [2:0] cout  [4];
  logic       shout [4];

  for (genvar k = 0; k < 4; k++) begin : g_dut
    bbm u_bbm (.clock, .loadx, .loade, .regls, .start, .ieb,
               .hob(k[1]), .lob(k[0]), .do_d, .dj_d, .cin, .shin,
               .dout(dout[k]), .cout(cout[k]), .shout(shout[k]));
  end

  always #5 clock = ~clock;

  int checks = 0, failures = 0, cycle = 0;
  int n_override = 0, n_hold = 0, n_first = 0, n_pos = 0, n_neg = 0;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [7:0] m_xh, m_qh, m_ph, m_x, m_q;
  logic [7:0] m_w [4];
  int         m_d [4];
  bit         m_first;

  function automatic digit_t rand_digit();
    case ($urandom % 3)
      0: return DIG_ZERO;
      1: return DIG_NEG;
      default: return DIG_POS;
    endcase
  endfunction

  function automatic int sel(logic [7:0] w);
    if ($signed(w) >= 8'sd32) return 1;
    if ($signed(w) <= -8'sd32) return -1;
    return 0;
  endfunction

  // one model clock for slice k
  task automatic model_step(int k, int dov, int djv);
    bit hob, lob;
    int t;
    hob = k[1];
    lob = k[0];
    t = int'(m_w[k]);
    if (hob) t += -64 * m_d[k];
    if (djv > 0) t += int'(m_x);
    if (djv < 0) t += 255 - int'(m_x) + (lob ? 1 : 0);
    if (dov < 0) t += int'(m_q);
    if (dov > 0) t += 255 - int'(m_q) + (lob ? 1 : 0);
    t = 2 * t + int'(shin) + int'(cin);
    m_w[k] = 8'(t);
    m_d[k] = sel(m_w[k]);
  endtask

  initial begin
    loadx = 0; loade = 0; regls = 0; start = 0; ieb = 0;
    do_d = DIG_ZERO; dj_d = DIG_ZERO; cin = 0; shin = 0;
    // reach a known state: load all holding registers, then start
    {loadx, ieb} = {1'b1, 8'h05}; @(posedge clock); #1;
    {loadx, loade, regls, ieb} = {1'b0, 1'b1, 1'b1, 8'h10}; @(posedge clock); #1;
    {regls, ieb} = {1'b0, 8'hf8}; @(posedge clock); #1;
    m_xh = 8'h05; m_ph = 8'h10; m_qh = 8'hf8;
    loade = 0; start = 1; @(posedge clock); #1;
    m_x = m_xh; m_q = m_qh;
    for (int k = 0; k < 4; k++) begin m_w[k] = m_ph; m_d[k] = 0; end
    m_first = 1;

    for (cycle = 0; cycle < 20000; cycle++) begin
      int dov, djv;
      // compare outputs for the current cycle
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (digit_value(dout[k]) != m_d[k] || dout[k] == 2'b10) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d slice hob=%0d lob=%0d: dout=%b model=%0d",
                                      cycle, k / 2, k % 2, dout[k], m_d[k]);
        end
        if (m_d[k] > 0) n_pos++;
        if (m_d[k] < 0) n_neg++;
      end
      // new inputs
      loadx = ($urandom % 8 == 0);
      loade = ($urandom % 4 == 0);
      regls = 1'($urandom);
      ieb   = 8'($urandom);
      // keep |x| + |q| <= 31/128 (x, q in [-15/64, 15/64] then halve one)
      if (loadx || loade) begin
        int v;
        v = int'($urandom % 16) - 8;
        if (loade && !loadx && regls) v = int'($urandom % 64) - 32;  // p in [-1/2, 1/2)
        ieb = 8'(v);
      end
      start = ($urandom % 40 == 0) || (start && ($urandom % 2 == 0));
      do_d  = rand_digit();
      dj_d  = rand_digit();
      shin  = ($urandom % 4 == 0);
      cin   = ($urandom % 4 == 0) ? 3'($urandom) : 3'd0;
      if (loadx && loade) n_override++;
      #1;
      dov = m_first ? 0 : digit_value(do_d);
      djv = m_first ? 0 : digit_value(dj_d);
      if (m_first && (do_d != DIG_ZERO || dj_d != DIG_ZERO)) n_first++;
      @(posedge clock);
      #1;
      // model clock edge
      if (start) begin
        if (m_first) n_hold++;
        m_x = m_xh;
        m_q = m_qh;
        for (int k = 0; k < 4; k++) begin m_w[k] = m_ph; m_d[k] = 0; end
      end else
        for (int k = 0; k < 4; k++) model_step(k, dov, djv);
      m_first = start;
      if (loadx) m_xh = ieb;
      else if (loade && regls) m_ph = ieb;
      else if (loade) m_qh = ieb;
    end

    checks++;
    if (n_override == 0 || n_hold == 0 || n_first == 0 || n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage override=%0d hold=%0d first=%0d pos=%0d neg=%0d",
               n_override, n_hold, n_first, n_pos, n_neg);
    end
    $display("override=%0d hold=%0d first_cycle_digits=%0d pos=%0d neg=%0d",
             n_override, n_hold, n_first, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
