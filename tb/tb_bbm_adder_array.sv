// Test of the carry-save adder array: for random and extreme operands,
// sum + 4 * carry must equal xs + qs + ws + wc + 64 * zadj + tcadj exactly.
// Also checks that no CARRY output has a weight below 2^2.
module tb_bbm_adder_array;
  logic [7:0] xs, qs, ws, wc, sum, carry;
  logic [1:0] zadj, tcadj;
  int checks = 0, failures = 0;

  bbm_adder_array dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one();
    int exp, got;
    #1;
    exp = int'(xs) + int'(qs) + int'(ws) + int'(wc) + 64 * int'(zadj) + int'(tcadj);
    got = int'(sum) + 4 * int'(carry);
    checks++;
    if (exp != got) begin
      failures++;
      if (failures < 10)
        $display("FAIL xs=%h qs=%h ws=%h wc=%h z=%0d t=%0d: %0d != %0d", xs, qs, ws, wc, zadj, tcadj, got, exp);
    end
  endtask

  initial begin
    // one operand bit at a time
    for (int b = 0; b < 36; b++) begin
      logic [35:0] v;
      v = 36'd1 << b;
      {xs, qs, ws, wc, zadj, tcadj} = v;
      one();
      {xs, qs, ws, wc, zadj, tcadj} = ~v;
      one();
    end
    for (int i = 0; i < 100000; i++) begin
      xs = 8'($urandom); qs = 8'($urandom); ws = 8'($urandom); wc = 8'($urandom);
      zadj = 2'($urandom); tcadj = 2'($urandom);
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
