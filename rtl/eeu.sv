// Elementary evaluation unit (EEU): one row i of the E-method linear system.
//
// NBBM byte slices are chained from the high-order slice (index 0, HOB = 1)
// to the low-order slice (index NBBM-1, LOB = 1, SHIN = 0, CIN = 000). Each
// slice's COUT and SHOUT feed the CIN and SHIN of the slice above it. Each
// slice has its own coefficient ROM and a multiplexer onto its 8-bit entry
// bus, which takes the matching byte of the argument bus when LOAD X is 1 and
// the ROM byte otherwise.
//
// Loading: a clock with load_x = 1 takes x from the argument bus; clocks with
// load_e = 1 take p (pq_sel = 1) or q (pq_sel = 0) of function fsel from the
// ROMs. A clock with start = 1 then starts the evaluation, and every further
// clock gives one digit of y_i on d_i, which is 0 in the first basic cycle
// after start and then has weights 1/2, 1/4, ...  d_1 and d_next are the
// digits of y_1 and y_{i+1} from the other EEUs, in the same timing.
// The structure is the document's; the ROM contents are this design's own.
module eeu
  import feu_pkg::*;
#(
  parameter int unsigned NBBM    = 8,  // slices: word of 8*NBBM bits
  parameter int unsigned H       = 4,  // function select bits
  parameter int unsigned EEU_IDX = 0   // row of the system (0 = y_1)
) (
  input  logic              clk,
  input  logic [H-1:0]      fsel,
  input  logic              pq_sel,
  input  logic              load_e,
  input  logic              load_x,
  input  logic [8*NBBM-1:0] arg,
  input  logic              start,
  input  digit_t            d_1,     // DO
  input  digit_t            d_next,  // DJ
  output digit_t            d_i      // DOUT of the high-order slice
);
  digit_t     dout  [NBBM];
  logic [2:0] cout  [NBBM+1];
  logic       shout [NBBM+1];

  assign cout[NBBM]  = 3'b000;
  assign shout[NBBM] = 1'b0;

  for (genvar b = 0; b < NBBM; b++) begin : g_slice
    logic [7:0] rom_data, ieb;

    coef_rom #(.H(H), .NBBM(NBBM), .EEU_IDX(EEU_IDX), .BYTE_IDX(b)) u_rom (
      .fsel, .pq_sel, .data(rom_data));

    always_comb ieb = load_x ? arg[8*(NBBM-b)-1 -: 8] : rom_data;

    bbm u_bbm (
      .clock(clk), .loadx(load_x), .loade(load_e), .regls(pq_sel), .start,
      .ieb, .hob(b == 0), .lob(b == NBBM - 1),
      .do_d(d_1), .dj_d(d_next),
      .cin(cout[b+1]), .shin(shout[b+1]),
      .dout(dout[b]), .cout(cout[b]), .shout(shout[b]));
  end

  assign d_i = dout[0];
endmodule
