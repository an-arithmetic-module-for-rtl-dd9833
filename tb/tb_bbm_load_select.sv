// Exhaustive test of the holding-register load decoder: LOADX alone loads
// x and overrides LOADE; LOADE loads p when REGLS = 1 and q when REGLS = 0;
// at most one enable is active.
module tb_bbm_load_select;
  logic loadx, loade, regls, loadxh, loadqh, loadph;
  int checks = 0, failures = 0;

  bbm_load_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic ex, eq, ep;
      {loadx, loade, regls} = 3'(v);
      #1;
      ex = loadx;
      eq = (loadx == 0) && (loade == 1) && (regls == 0);
      ep = (loadx == 0) && (loade == 1) && (regls == 1);
      checks++;
      if ({loadxh, loadqh, loadph} !== {ex, eq, ep}) begin
        failures++;
        $display("FAIL loadx=%b loade=%b regls=%b -> %b%b%b", loadx, loade, regls, loadxh, loadqh, loadph);
      end
      checks++;
      if (int'(loadxh) + int'(loadqh) + int'(loadph) > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
