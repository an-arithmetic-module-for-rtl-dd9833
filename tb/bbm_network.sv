// Bench-only network of byte slices without coefficient ROMs.
//
// NROW rows of NBBM slices, wired as in the function evaluation unit (slice
// 0 high-order, carries and sum bits passed upward, d_1 and d_(i+1) exchanged
// between rows, row 1's d_1 and the last row's d_(i+1) tied to zero), but
// every row takes its entry word directly from its own bus word[r]. A bench
// can so load any x, p and q. Loading and timing are those of the slices:
// loadx / loade+regls take the bus, start copies the holding registers.
module bbm_network
  import feu_pkg::*;
#(
  parameter int unsigned NROW = 4,
  parameter int unsigned NBBM = 8
) (
  input  logic              clk,
  input  logic              loadx,
  input  logic              loade,
  input  logic              regls,
  input  logic              start,
  input  logic [8*NBBM-1:0] word [NROW],
  output digit_t            digit [NROW]
);
  for (genvar r = 0; r < NROW; r++) begin : g_row
    digit_t     dout  [NBBM];
    logic [2:0] cout  [NBBM+1];
    logic       shout [NBBM+1];
    digit_t     d_1_in, d_next_in;

    assign cout[NBBM]  = 3'b000;
    assign shout[NBBM] = 1'b0;
    assign d_1_in      = (r == 0) ? DIG_ZERO : digit[0];
    assign d_next_in   = (r == NROW - 1) ? DIG_ZERO : digit[(r + 1) % NROW];

    for (genvar b = 0; b < NBBM; b++) begin : g_slice
      bbm u_bbm (
        .clock(clk), .loadx, .loade, .regls, .start,
        .ieb(word[r][8*(NBBM-b)-1 -: 8]), .hob(b == 0), .lob(b == NBBM - 1),
        .do_d(d_1_in), .dj_d(d_next_in), .cin(cout[b+1]), .shin(shout[b+1]),
        .dout(dout[b]), .cout(cout[b]), .shout(shout[b]));
    end
    assign digit[r] = dout[0];
  end
endmodule
