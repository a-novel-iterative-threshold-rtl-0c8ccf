// fdaj_harness: stimulus, stand-in FFT/IFFT cores and end-to-end checks
// for fdaj_top. The testbench that instantiates the top connects it here.
//
// Stimulus: a +/-A pseudo-noise chip sequence (the wanted spread-spectrum
// signal) buried 20 dB under Gaussian-like noise, plus narrowband
// interference 30 dB above the signal: five tones spaced 0.4 MHz around a
// 15.48 MHz carrier at a 62 MHz sample rate, so it covers about 2 MHz.
// One input sample every GAP clocks (GAP = 1 for the pipeline scheme,
// GAP = 3 for the iterative scheme, whose clock is the fast IJAS clock).
//
// Checks, each against values computed here from what the top received:
//  - both windowed branches (branch B from the input delayed by N/2);
//  - every IJAS output sample, its clamp flag and the frame's last
//    threshold, from a plain NUM_ITER-pass reference run on the spectrum the
//    FFT model delivered;
//  - the IJAS latency (pipeline: NUM_ITER*(N+2)+2 cycles from a frame's
//    first FFT sample; iterative: (NUM_ITER-1)*N+7 cycles from its last);
//  - every overlap-added output sample from the IFFT outputs;
//  - that the interference power is cut and the correlation with the chip
//    sequence rises.
// With STANDALONE = 0 the harness does not end the simulation; it raises
// `done` and hands its counts and signal-quality figures to the testbench.
// Mechanisms counted (each must occur): clamped bins, frames whose
// iterated threshold fell below the first, outputs that add two branches,
// outputs from the half frame before branch A's first sample.
module fdaj_harness
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter ijas_scheme_e SCHEME = SCHEME_PIPELINE,
  parameter int           GAP    = 1,
  parameter int           NFRAME = 16,
  parameter int           NUM_ITER = 3,
  parameter int           SEED   = 1,
  parameter bit           STANDALONE = 1'b1
) (
  output logic                   clk,
  output logic                   rst_n,
  output logic                   in_valid,
  output data_t                  in_data,
  input  logic                   win_a_valid,
  input  data_t                  win_a_data,
  input  logic                   win_a_sof,
  output logic                   fft_a_valid,
  output cplx_t                  fft_a_data,
  input  logic                   ijas_a_valid,
  input  cplx_t                  ijas_a_data,
  output logic                   ifft_a_valid,
  output data_t                  ifft_a_data,
  input  logic                   win_b_valid,
  input  data_t                  win_b_data,
  input  logic                   win_b_sof,
  output logic                   fft_b_valid,
  output cplx_t                  fft_b_data,
  input  logic                   ijas_b_valid,
  input  cplx_t                  ijas_b_data,
  output logic                   ifft_b_valid,
  output data_t                  ifft_b_data,
  input  logic                   out_valid,
  input  logic signed [DATA_W:0] out_data,
  input  logic                   clamp_a,
  input  logic                   clamp_b,
  input  th_t                    th_first_a,
  input  th_t                    th_last_a,
  input  th_t                    th_first_b,
  input  th_t                    th_last_b,
  input  logic                   overrun,
  input  logic                   synth_overflow,
  input  logic                   synth_underflow,
  // results, for a testbench that compares several runs
  output logic                   done,
  output int                     checks,
  output int                     failures,
  output real                    corr_in,
  output real                    corr_out,
  output real                    pow_ratio
);

  localparam int  N  = 512;
  localparam real PI = 3.14159265358979323846;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin checks = 0; failures = 0; done = 1'b0; end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial if (STANDALONE) begin
    repeat (NFRAME * N * GAP * 2 + 20 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stand-in FFT / IFFT cores ---------------------------------------
  cplx_t win_a_c, win_b_c, ifft_a_c, ifft_b_c;
  assign win_a_c = '{re: win_a_data, im: '0};
  assign win_b_c = '{re: win_b_data, im: '0};

  fft_model #(.N(N), .INVERSE(0), .SHIFT(4), .OUT_GAP(GAP)) u_fft_a (
    .clk(clk), .rst_n(rst_n), .in_valid(win_a_valid), .in_data(win_a_c),
    .out_valid(fft_a_valid), .out_data(fft_a_data));
  fft_model #(.N(N), .INVERSE(0), .SHIFT(4), .OUT_GAP(GAP)) u_fft_b (
    .clk(clk), .rst_n(rst_n), .in_valid(win_b_valid), .in_data(win_b_c),
    .out_valid(fft_b_valid), .out_data(fft_b_data));
  fft_model #(.N(N), .INVERSE(1), .SHIFT(5), .OUT_GAP(GAP)) u_ifft_a (
    .clk(clk), .rst_n(rst_n), .in_valid(ijas_a_valid), .in_data(ijas_a_data),
    .out_valid(ifft_a_valid), .out_data(ifft_a_c));
  fft_model #(.N(N), .INVERSE(1), .SHIFT(5), .OUT_GAP(GAP)) u_ifft_b (
    .clk(clk), .rst_n(rst_n), .in_valid(ijas_b_valid), .in_data(ijas_b_data),
    .out_valid(ifft_b_valid), .out_data(ifft_b_c));
  assign ifft_a_data = ifft_a_c.re;
  assign ifft_b_data = ifft_b_c.re;

  // ---- stimulus ----------------------------------------------------------
  int    xs[$];       // input samples
  int    chips[$];    // wanted signal, +/-1 per sample
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Stimulus random numbers: a 32-bit xorshift generator seeded with SEED,
  // so that runs with different configurations see the same input.
  logic [31:0] rng = 32'(SEED) ^ 32'h9e37_79b9;
  function automatic int unsigned rnd(int unsigned range);  // 0..range
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng % (range + 1);
  endfunction

  function automatic int gauss(int sigma);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'(rnd(2000)) - 1000;
    return s * sigma / 1155;  // sum of 4 uniforms has sigma ~1155
  endfunction

  initial begin
    real jam, ph[5];
    int  chip, x;
    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    for (int i = 0; i < 5; i++) ph[i] = 2.0 * PI * rnd(1000) / 1000.0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chip = 1;
    for (int t = 0; t < NFRAME * N; t++) begin
      if (t % 3 == 0) chip = (rnd(1) == 1) ? 1 : -1;
      jam = 0.0;
      for (int i = 0; i < 5; i++)
        jam += 2000.0 * $cos(2.0 * PI * (15.48e6 + (i - 2) * 0.4e6) / 62.0e6 * t + ph[i]);
      x = 100 * chip + gauss(1000) + int'(jam);
      xs.push_back(x);
      chips.push_back(chip);
      in_valid = 1'b1; in_data = data_t'(x);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (GAP - 1) @(negedge clk);
    end
  end

  // ---- windows -------------------------------------------------------------
  int na = 0, nb = 0;
  always @(posedge clk) if (rst_n) begin
    if (win_a_valid) begin
      chk(longint'(win_a_data) == (longint'(xs[na]) * ref_window(na % N, N)) >>> 15,
          $sformatf("window A sample %0d", na));
      chk(win_a_sof == (na % N == 0), "window A frame start");
      na++;
    end
    if (win_b_valid) begin
      chk(longint'(win_b_data) ==
          (((nb < N / 2) ? 0 : longint'(xs[nb - N / 2])) * ref_window(nb % N, N)) >>> 15,
          $sformatf("window B sample %0d", nb));
      chk(win_b_sof == (nb % N == 0), "window B frame start");
      nb++;
    end
  end

  // ---- IJAS reference, per branch ----------------------------------------
  fsample_t fr_in [2][$];
  cplx_t    exp_s [2][$];
  bit       exp_c [2][$];
  longint   exp_th[2][$];
  longint   fft_first [2][$], fft_last [2][$];
  int       nij [2] = '{0, 0};
  int       n_clamp = 0, n_thdrop = 0;

  task automatic fft_in(int b, cplx_t s);
    cplx_t o[$];
    bit c[$];
    longint t[$];
    if (fr_in[b].size() == 0) fft_first[b].push_back(cyc);
    fr_in[b].push_back(mk_sample(int'(s.re), int'(s.im)));
    if (fr_in[b].size() == N) begin
      fft_last[b].push_back(cyc);
      ref_ijas(fr_in[b], 4, NUM_ITER, o, c, t);
      foreach (o[i]) begin exp_s[b].push_back(o[i]); exp_c[b].push_back(c[i]); end
      exp_th[b].push_back(t[NUM_ITER - 1]);
      if (t[NUM_ITER - 1] < t[0]) n_thdrop++;
      fr_in[b].delete();
    end
  endtask

  task automatic ijas_out(int b, cplx_t s, bit clp, th_t thl);
    int f;
    f = nij[b] / N;
    if (nij[b] % N == 0) begin
      chk(longint'(thl) == exp_th[b][0], $sformatf("branch %0d frame %0d TH3", b, f));
      void'(exp_th[b].pop_front());
      if (SCHEME == SCHEME_PIPELINE)
        chk(cyc - fft_first[b][f] == NUM_ITER * (N + 2) + 2,
            $sformatf("pipeline IJAS latency %0d", cyc - fft_first[b][f]));
      else
        chk(cyc - fft_last[b][f] == (NUM_ITER - 1) * N + 7,
            $sformatf("iterative IJAS latency %0d", cyc - fft_last[b][f]));
    end
    chk(exp_s[b].size() > 0 && s == exp_s[b][0] && clp == exp_c[b][0],
        $sformatf("branch %0d IJAS sample %0d", b, nij[b]));
    if (clp) n_clamp++;
    void'(exp_s[b].pop_front());
    void'(exp_c[b].pop_front());
    nij[b]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fft_a_valid)  fft_in(0, fft_a_data);
    if (fft_b_valid)  fft_in(1, fft_b_data);
    if (ijas_a_valid) ijas_out(0, ijas_a_data, clamp_a, th_last_a);
    if (ijas_b_valid) ijas_out(1, ijas_b_data, clamp_b, th_last_b);
    chk(!overrun && !synth_overflow && !synth_underflow, "no overrun/overflow/underflow");
  end

  // ---- overlap-add --------------------------------------------------------
  int     ya[$], yb[$];
  longint expq[$];
  int     n_out = 0, n_added = 0, n_lead = 0;
  real    p_in = 0.0, p_out = 0.0, c_in = 0.0, c_out = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (ifft_a_valid) ya.push_back(int'(ifft_a_data));
    if (ifft_b_valid) begin
      yb.push_back(int'(ifft_b_data));
      if (yb.size() <= N / 2) begin
        expq.push_back(longint'(ifft_b_data));
        n_lead++;
      end else begin
        expq.push_back(longint'(ifft_b_data) + longint'(ya[yb.size() - 1 - N / 2]));
        n_added++;
      end
    end
    if (out_valid) begin
      int t;
      chk(expq.size() > 0 && longint'(out_data) == expq[0], $sformatf("output sample %0d", n_out));
      void'(expq.pop_front());
      // output sample n_out holds input time n_out - N/2
      t = n_out - N / 2;
      if (t >= 2 * N) begin
        p_in  += real'(xs[t]) * real'(xs[t]);
        p_out += real'(out_data) * real'(out_data);
        c_in  += real'(xs[t]) * chips[t];
        c_out += real'(out_data) * chips[t];
      end
      n_out++;
    end
  end

  // ---- end of test -------------------------------------------------------
  initial begin
    wait (rst_n);
    wait (n_out >= (NFRAME - 4) * N);
    repeat (50) @(posedge clk);
    $display("outputs %0d, clamped bins %0d, frames TH3<TH1 %0d, added %0d, lead %0d",
             n_out, n_clamp, n_thdrop, n_added, n_lead);
    $display("power in %.3g out %.3g; chip correlation / rms: in %.4f out %.4f",
             p_in, p_out, c_in / $sqrt(p_in), c_out / $sqrt(p_out));
    chk(n_clamp > 0, "interference clamping happened");
    if (NUM_ITER > 1) chk(n_thdrop > 0, "iteration lowered a threshold");
    chk(n_added > 0, "overlap-add of two branches happened");
    chk(n_lead > 0, "half-frame lead-in happened");
    chk(p_out < 0.5 * p_in, "interference power reduced");
    chk(c_out / $sqrt(p_out) > 1.5 * c_in / $sqrt(p_in), "signal correlation improved");
    corr_in   = c_in / $sqrt(p_in);
    corr_out  = c_out / $sqrt(p_out);
    pow_ratio = p_out / p_in;
    done      = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
