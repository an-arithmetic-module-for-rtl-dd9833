// Test of the operand gating: zero when GATE = 0, the operand when
// COMP = 0, its bitwise complement when COMP = 1. The complement plus the
// separate +1 must equal the negated operand modulo 256.
module tb_bbm_gating;
  logic [7:0] val, sgnd;
  logic gate, comp;
  int checks = 0, failures = 0;

  bbm_gating dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int g = 0; g < 4; g++) begin
        logic [7:0] exp;
        val  = 8'(v);
        gate = g[1];
        comp = g[0];
        #1;
        if (!gate)     exp = 8'd0;
        else if (comp) exp = 8'(255 - v);
        else           exp = 8'(v);
        checks++;
        if (sgnd !== exp) begin
          failures++;
          $display("FAIL val=%0d gate=%b comp=%b -> %0d", v, gate, comp, sgnd);
        end
        if (gate && comp) begin
          checks++;
          if (8'(sgnd + 8'd1) !== 8'(-v)) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
