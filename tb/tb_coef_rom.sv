// Test of the coefficient ROMs. Eighteen ROMs with 16-bit words (two bytes,
// 14 fraction bits) cover EEU rows 0..8; every address of every ROM is read
// and compared with the table's formula evaluated here with 64-bit integers:
//   p_i = trunc(c^i / (2 i!) * 2^14), c = (k - 4)/4, k = f/2
//   q_i = trunc((3/32)^i * 2^14) for odd f and i >= 1, else 0.
// Two ROMs at the default 64-bit word size are checked on the exact high
// bytes of p_1 = c/2 and q_1 = 3/32. The read is combinational.
module tb_coef_rom;
  localparam int unsigned H = 4;
  localparam int unsigned NROW = 9;

  logic [H-1:0] fsel;
  logic pq_sel;
  logic [7:0] data [NROW][2];
  logic [7:0] data_p1_hi, data_q1_hi;

  for (genvar i = 0; i < NROW; i++) begin : g_row
    for (genvar b = 0; b < 2; b++) begin : g_byte
      coef_rom #(.H(H), .NBBM(2), .EEU_IDX(i), .BYTE_IDX(b)) u_rom (
        .fsel, .pq_sel, .data(data[i][b]));
    end
  end
  coef_rom #(.EEU_IDX(1), .BYTE_IDX(0)) u_p1 (.fsel, .pq_sel, .data(data_p1_hi));
  coef_rom #(.EEU_IDX(1), .BYTE_IDX(0)) u_q1 (.fsel, .pq_sel(1'b0), .data(data_q1_hi));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expected(int f, int i, bit is_p);
    longint num, den, c, ac;
    num = 1;
    den = 1;
    if (is_p) begin
      c = longint'(f) % 16 / 2 - 4;
      ac = c < 0 ? -c : c;
      for (int j = 1; j <= i; j++) begin
        num *= ac;
        den *= 4 * j;
      end
      den *= 2;
      num = (num << 14) / den;
      return (c < 0 && i % 2 == 1) ? -num : num;
    end
    if (i == 0 || f % 2 == 0) return 0;
    for (int j = 1; j <= i; j++) begin
      num *= 3;
      den *= 32;
    end
    return (num << 14) / den;
  endfunction

  initial begin
    for (int f = 0; f < 2 ** H; f++)
      for (int pq = 0; pq < 2; pq++) begin
        fsel = H'(f);
        pq_sel = 1'(pq);
        #1;
        for (int i = 0; i < NROW; i++) begin
          logic [15:0] exp;
          exp = 16'(expected(f, i, pq == 1));
          checks++;
          if ({data[i][0], data[i][1]} !== exp) begin
            failures++;
            $display("FAIL f=%0d i=%0d %s: %h%h expected %h", f, i, (pq == 1) ? "p" : "q",
                     data[i][0], data[i][1], exp);
          end
        end
        if (pq == 1) begin
          checks++;
          if (data_p1_hi !== 8'(8 * ((f % 16) / 2 - 4))) begin
            failures++;
            $display("FAIL default-size p_1 high byte f=%0d: %h", f, data_p1_hi);
          end
          checks++;
          if (data_q1_hi !== ((f % 2 == 1) ? 8'd6 : 8'd0)) begin
            failures++;
            $display("FAIL default-size q_1 high byte f=%0d: %h", f, data_q1_hi);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
