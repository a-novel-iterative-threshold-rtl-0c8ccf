// tb_fdaj_iterations: the comparison the iterative-threshold algorithm is
// about. The same interfered input (identical stimulus seed) runs through
// the chain with one judgment/suppression iteration and with three. Both
// runs are checked sample by sample by their harnesses; in addition the
// three-iteration run must leave less interference power than the single
// pass, both must raise the correlation with the wanted chip sequence, and
// the three-iteration run must raise it further. The stimulus is fixed by
// its seed, so the comparison is repeatable.
module tb_fdaj_iterations;
  logic done1, done3;
  int   checks1, failures1, checks3, failures3;
  real  cin1, cout1, pr1, cin3, cout3, pr3;
  int   checks = 0, failures = 0;

  fdaj_bench #(.NUM_ITER(1), .SEED(7), .NFRAME(24)) one (
    .done(done1), .checks(checks1), .failures(failures1),
    .corr_in(cin1), .corr_out(cout1), .pow_ratio(pr1));
  fdaj_bench #(.NUM_ITER(3), .SEED(7), .NFRAME(24)) three (
    .done(done3), .checks(checks3), .failures(failures3),
    .corr_in(cin3), .corr_out(cout3), .pow_ratio(pr3));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks1 + checks3, failures + 1);
    $finish;
  end

  initial begin
    wait (done1 && done3);
    $display("1 iteration : power out/in %.3f, chip correlation in %.3f out %.3f", pr1, cin1, cout1);
    $display("3 iterations: power out/in %.3f, chip correlation in %.3f out %.3f", pr3, cin3, cout3);
    chk(cin1 == cin3, "both runs saw the same input");
    chk(pr3 < pr1, "three iterations leave less interference power");
    chk(cout1 > cin1 && cout3 > cin3, "both runs raise the chip correlation");
    chk(cout3 > cout1, "three iterations give the higher chip correlation");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks1 + checks3,
             failures + failures1 + failures3);
    $finish;
  end
endmodule
