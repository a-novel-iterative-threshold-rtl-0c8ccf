// tb_ijas_pu: one processing unit of the pipeline scheme. Frames with
// strong narrowband bins are streamed in, first back to back at one sample
// per clock, then with random gaps; every output sample is compared with
// one pass of the reference clamping algorithm, and at full rate the first
// output sample must leave N+2 cycles after the frame's first input.
module tb_ijas_pu;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  localparam int NF = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid, clamped, th_valid;
  fsample_t in_sample = '0, out_sample;
  th_t th;

  ijas_pu dut (.*);

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

  cplx_t  exp_s[$];
  bit     exp_c[$];
  longint exp_th[$];
  longint cyc = 0, first_in[$];
  int     nout = 0, nclamp = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (nout % N == 0) begin
      chk(longint'(th) == exp_th[0], $sformatf("frame threshold %0d want %0d", th, exp_th[0]));
      void'(exp_th.pop_front());
      if (nout / N < 3)
        chk(cyc - first_in[nout / N] == N + 2,
            $sformatf("latency %0d want %0d", cyc - first_in[nout / N], N + 2));
    end
    chk(exp_s.size() > 0 && out_sample.s == exp_s[0] && clamped == exp_c[0],
        $sformatf("output sample %0d", nout));
    if (out_sample.s.im == 0 && clamped) nclamp++;
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
      mk_frame(N, (fr == 2) ? 0 : 8 + fr, 1500, 25000, f);
      ref_ijas(f, 4, 1, o, c, t);
      foreach (o[i]) begin exp_s.push_back(o[i]); exp_c.push_back(c[i]); end
      exp_th.push_back(t[0]);
      for (int i = 0; i < N; i++) begin
        if (i == 0) first_in.push_back(cyc);
        in_valid = 1; in_sample = f[i];
        @(negedge clk);
        in_valid = 0;
        if (fr >= 3 && $urandom_range(3) == 0) repeat ($urandom_range(2)) @(negedge clk);
      end
    end
    repeat (N + 10) @(negedge clk);
    chk(nout == NF * N, $sformatf("all %0d samples out (got %0d)", NF * N, nout));
    chk(nclamp > 0, "some bins clamped");
    $display("clamped bins: %0d", nclamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
