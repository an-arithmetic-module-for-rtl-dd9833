// Test of the slice control: SELW, LOADXQ and CLRD follow START in the same
// cycle; DIGITE is START of the previous clock, so it is high in the first
// basic cycle after every clock with START = 1, also when START is held.
module tb_bbm_control;
  logic clock = 1'b0, start;
  logic selw, loadxq, clrd, digite;
  int checks = 0, failures = 0;
  logic prev_start;

  bbm_control dut (.*);

  always #5 clock = ~clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b1;
    @(posedge clock);
    prev_start = start;
    #1;
    for (int c = 0; c < 400; c++) begin
      start = (c % 37 < 3) ? 1'b1 : 1'($urandom % 5 == 0);
      #1;
      checks++;
      if ({selw, loadxq, clrd} !== {3{start}}) begin
        failures++;
        $display("FAIL cycle %0d: start=%b selw=%b loadxq=%b clrd=%b", c, start, selw, loadxq, clrd);
      end
      checks++;
      if (digite !== prev_start) begin
        failures++;
        $display("FAIL cycle %0d: digite=%b expected %b", c, digite, prev_start);
      end
      @(posedge clock);
      prev_start = start;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
