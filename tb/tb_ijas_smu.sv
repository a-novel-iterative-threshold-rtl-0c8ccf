// tb_ijas_smu: drives the sum modification unit the way the iterative
// scheme does (load SUM_1, then threshold passes with compare results and
// flags computed here from the amplitudes) and checks that after each pass
// SUM_{i+1} equals the plain sum of amplitudes clamped at TH_i, and that
// TH_{i+1} = 4*SUM_{i+1}/512.
module tb_ijas_smu;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  localparam int SUM_W = AMP_W + 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, load = 0, acc_en = 0, last = 0, ge = 0, fr = 0, th_update;
  logic [SUM_W-1:0] sum1 = '0, sum_cur;
  amp_t amp = '0;
  th_t th_cur;

  ijas_smu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fsample_t f[$];
    longint a[N], clampv[N];
    bit flag[N];
    longint s, th;
    int ndec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int fr_i = 0; fr_i < 8; fr_i++) begin
      mk_frame(N, 2 * fr_i + 1, 1500, 30000, f);
      s = 0;
      foreach (f[i]) begin a[i] = f[i].amp; clampv[i] = a[i]; s += a[i]; flag[i] = 0; end
      sum1 = SUM_W'(s); load = 1; @(negedge clk); load = 0;
      th = s * 4 / N;
      chk(longint'(sum_cur) == s && longint'(th_cur) == th, "load SUM_1 / TH_1");
      for (int p = 0; p < 4; p++) begin
        for (int i = 0; i < N; i++) begin
          acc_en = 1; last = (i == N - 1); amp = amp_t'(a[i]);
          ge = a[i] >= longint'(th_cur); fr = flag[i];
          flag[i] = ge;
          if (ge) clampv[i] = longint'(th_cur);
          @(negedge clk);
          acc_en = 0; last = 0;
        end
        s = 0; foreach (clampv[i]) s += clampv[i];
        chk(th_update, "th_update pulse");
        chk(longint'(sum_cur) == s, $sformatf("pass %0d sum %0d want %0d", p, sum_cur, s));
        chk(longint'(th_cur) == s * 4 / N, "next threshold");
        if (longint'(th_cur) < th) ndec++;
        th = longint'(th_cur);
        @(negedge clk);
        chk(!th_update, "th_update single cycle");
      end
    end
    chk(ndec > 0, "threshold decreased");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
