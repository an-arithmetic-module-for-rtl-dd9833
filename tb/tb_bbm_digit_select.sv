// Exhaustive test of the digit selection on the 8-bit estimate read as
// XX.XXXXXX: +1 (code 11) from 1/2 up, -1 (code 01) from -1/2 down, else 0.
module tb_bbm_digit_select;
  import feu_pkg::*;
  logic [7:0] result;
  digit_t digit;
  int checks = 0, failures = 0;

  bbm_digit_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      real w;
      digit_t exp;
      result = 8'(v);
      #1;
      w = v / 64.0;
      if (w >= 0.5)       exp = 2'b11;
      else if (w <= -0.5) exp = 2'b01;
      else                exp = 2'b00;
      checks++;
      if (digit !== exp) begin
        failures++;
        $display("FAIL w=%f digit=%b", w, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
