// tb_ijas_pipeline: the three-stage pipeline IJAS scheme against the
// reference three-pass iterative-threshold algorithm. Frames with and
// without interference go in back to back, then with random gaps. At one
// sample per clock the first output must leave 3*(N+2) cycles after the
// frame's first input. Also checks that later thresholds are lower than
// the first in frames with interference.
module tb_ijas_pipeline;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  localparam int NF = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid, clamped;
  fsample_t in_sample = '0;
  cplx_t out_sample;
  th_t th_first, th_last;

  ijas_pipeline dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t  exp_s[$];
  bit     exp_c[$];
  longint exp_th3[$];
  longint cyc = 0, first_in[$];
  int     nout = 0, nclamp = 0, ndrop = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout % N == 0) begin
      chk(longint'(th_last) == exp_th3[0], $sformatf("TH3 %0d want %0d", th_last, exp_th3[0]));
      void'(exp_th3.pop_front());
      if (nout / N < 3)
        chk(cyc - first_in[nout / N] == 3 * (N + 2),
            $sformatf("latency %0d want %0d", cyc - first_in[nout / N], 3 * (N + 2)));
    end
    chk(exp_s.size() > 0 && out_sample == exp_s[0] && clamped == exp_c[0],
        $sformatf("output sample %0d", nout));
    if (clamped) nclamp++;
    void'(exp_s.pop_front()); void'(exp_c.pop_front());
    nout++;
  end

  initial begin
    fsample_t f[$];
    cplx_t o[$];
    bit c[$];
    longint t[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int fr = 0; fr < NF; fr++) begin
      mk_frame(N, (fr == 1) ? 0 : 4 * fr + 2, 1200, 30000, f);
      ref_ijas(f, 4, 3, o, c, t);
      foreach (o[i]) begin exp_s.push_back(o[i]); exp_c.push_back(c[i]); end
      exp_th3.push_back(t[2]);
      if (t[2] < t[0]) ndrop++;
      for (int i = 0; i < N; i++) begin
        if (i == 0) first_in.push_back(cyc);
        in_valid = 1; in_sample = f[i];
        @(negedge clk);
        in_valid = 0;
        if (fr >= 4 && $urandom_range(4) == 0) repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    repeat (3 * N + 20) @(negedge clk);
    chk(nout == NF * N, $sformatf("all samples out (got %0d)", nout));
    chk(nclamp > 0, "bins clamped");
    chk(ndrop > 0, "threshold lowered by iteration");
    $display("clamped bins %0d, frames with TH3<TH1 %0d", nclamp, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
