// tb_ijas_tcu: checks TH = 4*SUM/512 (a 7-bit shift), registered one cycle
// after sum_valid and held between sums.
module tb_ijas_tcu;
  import fdaj_pkg::*;
  localparam int SUM_W = AMP_W + 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, sum_valid = 0, th_valid;
  logic [SUM_W-1:0] sum = '0;
  th_t th;

  ijas_tcu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, exp_th;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(th == 0 && !th_valid, "reset value");
    for (int i = 0; i < 200; i++) begin
      s = (i == 0) ? (longint'(1) << SUM_W) - 1 : longint'($urandom) % (longint'(1) << SUM_W);
      sum = SUM_W'(s); sum_valid = 1;
      exp_th = (s * 4) / 512;
      @(negedge clk);
      sum_valid = 0;
      chk(th_valid, "th_valid follows sum_valid");
      chk(longint'(th) == exp_th, $sformatf("th for sum %0d: got %0d want %0d", s, th, exp_th));
      sum = SUM_W'($urandom);
      repeat (1 + $urandom_range(2)) begin
        @(negedge clk);
        chk(!th_valid && longint'(th) == exp_th, "threshold held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
