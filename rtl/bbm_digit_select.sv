// Digit select logic of the byte-slice module.
//
// Chooses the next result digit from the assimilated residual estimate, read
// as a two's complement number with two integer and six fraction bits:
// +1 if it is at least 1/2, -1 if it is at most -1/2, and 0 otherwise.
// The rule is the document's selection function; combinational.
module bbm_digit_select
  import feu_pkg::*;
(
  input  logic [7:0] result,  // XX.XXXXXX
  output digit_t     digit
);
  always_comb begin
    if ($signed(result) >= 8'sd32)       digit = DIG_POS;
    else if ($signed(result) <= -8'sd32) digit = DIG_NEG;
    else                                 digit = DIG_ZERO;
  end
endmodule
