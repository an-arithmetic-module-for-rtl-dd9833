// Basic byte-slice module (BBM): one 8-bit slice of an elementary evaluation
// unit (EEU).
//
// A chain of these slices, high-order byte first, carries out one row of the
// E-method recursion on redundant residuals:
//
//   w_i <- 2 * (w_i - d_i - q * d_1 + x * d_{i+1})
//
// where d_1 (DO), d_{i+1} (DJ) and d_i (this EEU's own DOUT) are the signed
// digits chosen in the previous basic cycle.
//
// Holding registers. IEB loads XHREG when LOADX = 1, otherwise PHREG or QHREG
// when LOADE = 1 (REGLS = 1 picks p). They can be reloaded while a
// computation runs.
//
// Active registers. A clock with START = 1 copies XHREG to XREG and QHREG to
// QREG, puts p into WSREG, zero into WCREG and zero into DREG. With START = 0
// each clock stores the doubled adder-array result: WSREG = {SUM[6:0], SHIN},
// WCREG = {CARRY[4:0], CIN}, while SUM[7] leaves on SHOUT and CARRY[7:5] on
// COUT for the next higher slice. No carry ripples between slices.
//
// Digit. In the slice with HOB = 1 (format XX.XXXXXX) the assimilation logic
// adds the two new residual bytes and the digit select logic picks the next
// digit, which DREG holds and DOUT shows during the following basic cycle.
// In the first basic cycle after START, DOUT is 0 (the digit of weight 1) and
// the DO/DJ digits count as zero; DOUT then gives the digits of weight 1/2,
// 1/4, ... one per clock. In other slices DOUT has no meaning.
//
// Only the slice with LOB = 1 adds the two's complement carry-ins; only the
// slice with HOB = 1 subtracts its own digit. A slice may be both.
//
// The structure, port list and bit routing follow the document's block
// diagram. Clearing DREG at START and the DIGITE timing are this design's
// choices. There is no reset; START initialises the active registers.
module bbm
  import feu_pkg::*;
(
  input  logic       clock,
  input  logic       loadx,   // load XHREG from IEB (overrides LOADE)
  input  logic       loade,   // load PHREG or QHREG from IEB
  input  logic       regls,   // 1: PHREG, 0: QHREG
  input  logic       start,   // holding -> active registers
  input  logic [7:0] ieb,     // initial entry bus
  input  logic       hob,     // high-order byte of the EEU
  input  logic       lob,     // low-order byte of the EEU
  input  digit_t     do_d,    // DO: digit of y_1
  input  digit_t     dj_d,    // DJ: digit of y_{i+1}
  input  logic [2:0] cin,     // COUT of the next lower slice
  input  logic       shin,    // SHOUT of the next lower slice
  output digit_t     dout,    // DOUT: digit of y_i (valid when HOB = 1)
  output logic [2:0] cout,    // to CIN of the next higher slice
  output logic       shout    // to SHIN of the next higher slice
);
  // holding registers
  logic [7:0] xhreg, qhreg, phreg;
  // active registers
  logic [7:0] xreg, qreg, wsreg, wcreg;
  digit_t     dreg;

  logic loadxh, loadqh, loadph;
  logic selw, loadxq, clrd, digite;
  logic gatex, compx, gateq, compq;
  logic [1:0] tcadj, zadj;
  logic [7:0] xsgnd, qsgnd, sum, carry, result;
  logic [7:0] wsin, wcin;
  digit_t     digit;

  bbm_load_select u_ls (.loadx, .loade, .regls, .loadxh, .loadqh, .loadph);

  bbm_control u_cntl (.clock, .start, .selw, .loadxq, .clrd, .digite);

  always_ff @(posedge clock) begin
    if (loadxh) xhreg <= ieb;
    if (loadqh) qhreg <= ieb;
    if (loadph) phreg <= ieb;
  end

  bbm_tclog u_tclog (.do_d, .dj_d, .lob, .digite,
                     .gatex, .compx, .gateq, .compq, .tcadj);

  bbm_gating u_gatx (.val(xreg), .gate(gatex), .comp(compx), .sgnd(xsgnd));
  bbm_gating u_gatq (.val(qreg), .gate(gateq), .comp(compq), .sgnd(qsgnd));

  bbm_sdc u_sdc (.hob, .dout(dreg), .zadj);

  bbm_adder_array u_addarr (.xs(xsgnd), .qs(qsgnd), .ws(wsreg), .wc(wcreg),
                            .zadj, .tcadj, .sum, .carry);

  // multiplexer in front of WSREG and AND array in front of WCREG
  always_comb begin
    wsin = selw ? phreg : {sum[6:0], shin};
    wcin = {carry[4:0], cin} & {8{!selw}};
  end

  always_ff @(posedge clock) begin
    if (loadxq) begin
      xreg <= xhreg;
      qreg <= qhreg;
    end
    wsreg <= wsin;
    wcreg <= wcin;
  end

  bbm_assim u_assim (.sum_lo(sum[6:0]), .carry_lo(carry[4:0]), .shin, .cin, .result);

  bbm_digit_select u_ds (.result, .digit);

  always_ff @(posedge clock) dreg <= clrd ? DIG_ZERO : digit;

  always_comb begin
    dout  = dreg;
    cout  = carry[7:5];
    shout = sum[7];
  end
endmodule
