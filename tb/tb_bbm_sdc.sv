// Exhaustive test of the sign digit compensation: in the high-order slice
// the two bits placed at weights 2^1 and 2^0 of XX.XXXXXX must add -d, i.e.
// zadj * 64 = -64 * d modulo 256; elsewhere they are zero.
module tb_bbm_sdc;
  import feu_pkg::*;
  logic hob;
  digit_t dout;
  logic [1:0] zadj;
  int checks = 0, failures = 0;

  bbm_sdc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static digit_t codes [3] = '{2'b00, 2'b01, 2'b11};
    static int     vals  [3] = '{0, -1, 1};
    for (int h = 0; h < 2; h++)
      for (int k = 0; k < 3; k++) begin
        hob  = 1'(h);
        dout = codes[k];
        #1;
        checks++;
        if (hob) begin
          if (8'({zadj, 6'b0}) !== 8'(-64 * vals[k])) begin
            failures++;
            $display("FAIL hob=1 d=%0d zadj=%b", vals[k], zadj);
          end
        end else if (zadj !== 2'b00) begin
          failures++;
          $display("FAIL hob=0 zadj=%b", zadj);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
