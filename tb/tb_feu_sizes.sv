// Runs the function evaluation unit at several sizes side by side: one slice
// per row (each slice is both high- and low-order byte), a single row,
// two and three slices, and nine rows of one slice. Each size has its own
// checking environment (feu_check_env); the bench ends when all are done.
module tb_feu_sizes;
  localparam int NENV = 5;
  logic done [NENV];
  int   c    [NENV];
  int   f    [NENV];

  feu_check_env #(.NEEU(4), .NBBM(1), .NEVAL(64)) u_e0 (.done(done[0]), .n_checks(c[0]), .n_failures(f[0]));
  feu_check_env #(.NEEU(1), .NBBM(2), .NEVAL(32)) u_e1 (.done(done[1]), .n_checks(c[1]), .n_failures(f[1]));
  feu_check_env #(.NEEU(2), .NBBM(3), .NEVAL(48)) u_e2 (.done(done[2]), .n_checks(c[2]), .n_failures(f[2]));
  feu_check_env #(.NEEU(5), .NBBM(2), .NEVAL(48)) u_e3 (.done(done[3]), .n_checks(c[3]), .n_failures(f[3]));
  feu_check_env #(.NEEU(9), .NBBM(1), .NEVAL(64)) u_e4 (.done(done[4]), .n_checks(c[4]), .n_failures(f[4]));

  int checks, failures;

  task automatic report(int extra);
    checks = 0;
    failures = extra;
    for (int i = 0; i < NENV; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    #(10 * 200000);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    #1;
    report(0);
    $finish;
  end
endmodule
