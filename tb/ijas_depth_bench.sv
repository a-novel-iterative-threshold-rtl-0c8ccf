// ijas_depth_bench: runs both IJAS schemes with one iteration count other
// than the default three and compares them with the reference multi-pass
// algorithm. Helper of tb_ijas_depth.
// Both units receive the same frames, one sample every NUM_ITER clocks,
// which is the fastest rate the iterative scheme accepts. Every output
// sample, its clamp flag and the frame's final threshold are checked
// against the reference. The iterative unit must also keep its
// (NUM_ITER-1)*N + 5 cycle latency after a frame's last input and never
// report an overrun. With NUM_ITER = 1 the iterative unit has no
// flag-register pass at all. With NUM_ITER >= 4 it repeats the middle pass
// rule (flagged bins contribute the previous threshold).
// Interface: clk in; done rises when all frames were checked, with the
// counts on checks / failures.
module ijas_depth_bench
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int NUM_ITER = 2,
  parameter int NF       = 5
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = 512;

  logic     rst_n = 1'b0, in_valid = 1'b0;
  fsample_t in_sample = '0;
  logic     p_valid, p_clamped, i_valid, i_clamped, i_overrun;
  cplx_t    p_sample, i_sample;
  th_t      p_th_first, p_th_last, i_th_first, i_th_last;

  ijas_pipeline #(.N(N), .K(4), .NUM_ITER(NUM_ITER)) u_pipe (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_sample  (in_sample),
    .out_valid  (p_valid),
    .out_sample (p_sample),
    .clamped    (p_clamped),
    .th_first   (p_th_first),
    .th_last    (p_th_last)
  );

  ijas_iterative #(.N(N), .K(4), .NUM_ITER(NUM_ITER)) u_iter (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_sample  (in_sample),
    .out_valid  (i_valid),
    .out_sample (i_sample),
    .clamped    (i_clamped),
    .th_first   (i_th_first),
    .th_last    (i_th_last),
    .overrun    (i_overrun)
  );

  initial begin done = 1'b0; checks = 0; failures = 0; end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (NUM_ITER=%0d): %s", NUM_ITER, what);
    end
  endtask

  cplx_t  exp_s[$];
  bit     exp_c[$];
  longint exp_th1[$], exp_thl[$];
  longint cyc = 0, last_in[$];
  int     np = 0, ni = 0, nclamp = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // pipeline scheme output
  always @(posedge clk) if (rst_n && p_valid) begin
    if (np % N == 0)
      chk(longint'(p_th_last) == exp_thl[np / N],
          $sformatf("pipeline final TH %0d want %0d", p_th_last, exp_thl[np / N]));
    chk(np < exp_s.size() && p_sample == exp_s[np] && p_clamped == exp_c[np],
        $sformatf("pipeline sample %0d", np));
    np++;
  end

  // iterative scheme output
  always @(posedge clk) if (rst_n) begin
    chk(!i_overrun, "iterative: no overrun");
    if (i_valid) begin
      if (ni % N == 0) begin
        chk(longint'(i_th_last) == exp_thl[ni / N],
            $sformatf("iterative final TH %0d want %0d", i_th_last, exp_thl[ni / N]));
        chk(longint'(i_th_first) == exp_th1[ni / N],
            $sformatf("iterative TH1 %0d want %0d", i_th_first, exp_th1[ni / N]));
        chk(cyc - last_in[ni / N] == longint'((NUM_ITER - 1) * N + 5),
            $sformatf("iterative latency %0d want %0d", cyc - last_in[ni / N],
                      longint'((NUM_ITER - 1) * N + 5)));
      end
      chk(ni < exp_s.size() && i_sample == exp_s[ni] && i_clamped == exp_c[ni],
          $sformatf("iterative sample %0d", ni));
      if (i_clamped) nclamp++;
      ni++;
    end
  end

  initial begin
    fsample_t f[$];
    cplx_t o[$];
    bit c[$];
    longint t[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int fr = 0; fr < NF; fr++) begin
      mk_frame(N, 4 * fr + 2, 1000, 26000, f);
      ref_ijas(f, 4, NUM_ITER, o, c, t);
      foreach (o[i]) begin exp_s.push_back(o[i]); exp_c.push_back(c[i]); end
      exp_th1.push_back(t[0]);
      exp_thl.push_back(t[NUM_ITER-1]);
      for (int i = 0; i < N; i++) begin
        in_valid  = 1'b1;
        in_sample = f[i];
        if (i == N - 1) last_in.push_back(cyc);
        @(negedge clk);
        in_valid = 1'b0;
        repeat (NUM_ITER - 1) @(negedge clk);
      end
    end
    repeat ((NUM_ITER + 2) * N + 20) @(negedge clk);
    chk(np == NF * N, $sformatf("pipeline: all samples out (got %0d)", np));
    chk(ni == NF * N, $sformatf("iterative: all samples out (got %0d)", ni));
    chk(nclamp > 0, "bins clamped");
    $display("NUM_ITER=%0d: %0d frames, %0d clamped bins, %0d checks, %0d failures",
             NUM_ITER, NF, nclamp, checks, failures);
    done = 1'b1;
  end
endmodule
