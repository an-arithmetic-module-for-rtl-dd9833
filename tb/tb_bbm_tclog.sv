// Exhaustive test of the two's complement logic. For every pair of digit
// codes, LOB and DIGITE: x is added as d_{i+1} * x, q as -d_1 * q, the
// carry-in equals the number of complemented operands in the low-order slice
// and is 0 elsewhere, and everything is zero while DIGITE is high.
module tb_bbm_tclog;
  import feu_pkg::*;
  digit_t do_d, dj_d;
  logic lob, digite, gatex, compx, gateq, compq;
  logic [1:0] tcadj;
  int checks = 0, failures = 0;

  bbm_tclog dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int dx, dq, ex_tc;
      logic egx, ecx, egq, ecq;
      {do_d, dj_d, lob, digite} = 6'(v);
      #1;
      // digit values from the code table: 00 = 0, 01 = -1, 11 = +1, 10 illegal (0)
      dx = (dj_d == 2'b11) ? 1 : (dj_d == 2'b01) ? -1 : 0;
      dq = (do_d == 2'b11) ? 1 : (do_d == 2'b01) ? -1 : 0;
      if (digite) begin
        dx = 0;
        dq = 0;
      end
      egx = (dx != 0);
      ecx = (dx < 0);
      egq = (dq != 0);
      ecq = (dq > 0);
      ex_tc = lob ? int'(ecx) + int'(ecq) : 0;
      checks++;
      if ({gatex, compx, gateq, compq} !== {egx, ecx, egq, ecq} || int'(tcadj) != ex_tc) begin
        failures++;
        $display("FAIL do=%b dj=%b lob=%b digite=%b -> gx%b cx%b gq%b cq%b tc%0d",
                 do_d, dj_d, lob, digite, gatex, compx, gateq, compq, tcadj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
