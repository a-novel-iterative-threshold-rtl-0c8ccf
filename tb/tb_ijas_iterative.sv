// tb_ijas_iterative: the iterative IJAS scheme (ping-pong RAMs, flag
// register, sum modification) against the reference three-pass algorithm.
// Samples arrive exactly every third clock (f_s = 3 f_in) for several
// frames, so the unit must keep up with no slack, then at random slower
// spacing. Checks every output sample, the thresholds, the output latency
// of 2N+5 cycles after a frame's last input sample, the N-cycle output
// burst, processing overlapping the storage of the next frame and that no overrun is reported.
module tb_ijas_iterative;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  localparam int NF = 7;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid, clamped, overrun;
  fsample_t in_sample = '0;
  cplx_t out_sample;
  th_t th_first, th_last;

  ijas_iterative dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t  exp_s[$];
  bit     exp_c[$];
  longint exp_th1[$], exp_th3[$];
  longint cyc = 0, last_in[$], prev_out = 0;
  int     nout = 0, nclamp = 0, nbank1 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    chk(!overrun, "no overrun");
    if (out_valid) begin
      if (nout % N == 0) begin
        chk(longint'(th_last) == exp_th3[0], $sformatf("TH3 %0d want %0d", th_last, exp_th3[0]));
        chk(longint'(th_first) == exp_th1[0], $sformatf("TH1 %0d want %0d", th_first, exp_th1[0]));
        void'(exp_th3.pop_front()); void'(exp_th1.pop_front());
        // output of this frame while the next frame is still being stored:
        // the two RAMs are in use at once (ping-pong)
        if (nout / N < NF - 1 && last_in.size() == nout / N + 1) nbank1++;
        chk(cyc - last_in[nout / N] == 2 * N + 5,
            $sformatf("latency %0d want %0d", cyc - last_in[nout / N], 2 * N + 5));
      end else begin
        chk(cyc == prev_out + 1, "output burst contiguous");
      end
      prev_out = cyc;
      chk(exp_s.size() > 0 && out_sample == exp_s[0] && clamped == exp_c[0],
          $sformatf("output sample %0d", nout));
      if (clamped) nclamp++;
      void'(exp_s.pop_front()); void'(exp_c.pop_front());
      nout++;
    end
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
      mk_frame(N, (fr == 2) ? 0 : 3 * fr + 3, 1000, 28000, f);
      ref_ijas(f, 4, 3, o, c, t);
      foreach (o[i]) begin exp_s.push_back(o[i]); exp_c.push_back(c[i]); end
      exp_th1.push_back(t[0]);
      exp_th3.push_back(t[2]);
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_sample = f[i];
        if (i == N - 1) last_in.push_back(cyc);
        @(negedge clk);
        in_valid = 0;
        repeat (2) @(negedge clk);
        if (fr >= 5) repeat ($urandom_range(2)) @(negedge clk);
      end
    end
    repeat (3 * N + 20) @(negedge clk);
    chk(nout == NF * N, $sformatf("all samples out (got %0d)", nout));
    chk(nclamp > 0, "bins clamped");
    chk(nbank1 >= NF - 1, "frames processed while the next was stored");
    $display("clamped bins %0d", nclamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
