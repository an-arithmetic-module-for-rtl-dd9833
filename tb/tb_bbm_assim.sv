// Test of the assimilation logic: the result is the 8-bit sum, carry out
// dropped, of the doubled sum byte {sum_lo, shin} and the doubled carry byte
// {carry_lo, cin}. Exhaustive over the low bits, random over the rest.
module tb_bbm_assim;
  logic [6:0] sum_lo;
  logic [4:0] carry_lo;
  logic shin;
  logic [2:0] cin;
  logic [7:0] result;
  int checks = 0, failures = 0;

  bbm_assim dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int exp;
      sum_lo = 7'($urandom); carry_lo = 5'($urandom);
      shin = 1'(i); cin = 3'(i >> 1);
      #1;
      exp = (2 * int'(sum_lo) + int'(shin) + 8 * int'(carry_lo) + int'(cin)) % 256;
      checks++;
      if (int'(result) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %b %h -> %h (exp %h)", sum_lo, carry_lo, shin, cin, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
