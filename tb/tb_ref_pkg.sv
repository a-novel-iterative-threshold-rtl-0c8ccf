// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: integer square root, the Hamming window
// coefficient, and the iterative-threshold clamping algorithm in its plain
// form (recompute the full mean after every clamping pass).
package tb_ref_pkg;
  import fdaj_pkg::*;

  // floor(sqrt(x)) via a real square root, corrected to be exact.
  function automatic longint ref_isqrt(longint x);
    longint r;
    r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  // round(32768 * (0.54 - 0.46 cos(2 pi n / N)))
  function automatic int ref_window(int n, int nn);
    real w;
    w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979323846 * n / nn);
    return int'($floor(w * 32768.0 + 0.5));
  endfunction

  function automatic fsample_t mk_sample(int re, int im);
    fsample_t s;
    s.s.re = data_t'(re);
    s.s.im = data_t'(im);
    s.amp  = amp_t'(ref_isqrt(longint'(re) * re + longint'(im) * im));
    return s;
  endfunction

  // NUM_ITER judgment/clamping passes over one frame, each with a threshold
  // K * mean of the previous pass's amplitudes. Returns the output frame,
  // the per-bin "clamped in the last pass" flags and the thresholds.
  function automatic void ref_ijas(input fsample_t fin[$], input int k,
                                   input int niter, output cplx_t fout[$],
                                   output bit fclamp[$], output longint ths[$]);
    fsample_t cur[$];
    longint   sum, th;
    int       nn;
    cur = fin;
    nn  = fin.size();
    fout.delete(); fclamp.delete(); ths.delete();
    for (int i = 0; i < nn; i++) fclamp.push_back(1'b0);
    for (int it = 0; it < niter; it++) begin
      sum = 0;
      foreach (cur[i]) sum += longint'(cur[i].amp);
      th = (sum * k) / nn;
      ths.push_back(th);
      foreach (cur[i]) begin
        fclamp[i] = longint'(cur[i].amp) >= th;
        if (fclamp[i]) begin
          cur[i].s.re = data_t'((th > 32767) ? 32767 : th);
          cur[i].s.im = '0;
          cur[i].amp  = amp_t'(th);
        end
      end
    end
    foreach (cur[i]) fout.push_back(cur[i].s);
  endfunction

  // A test spectrum: noise-like bins plus NJAM strong narrowband bins.
  function automatic void mk_frame(input int nn, input int njam,
                                   input int noise, input int jam,
                                   output fsample_t f[$]);
    int re, im, pos;
    f.delete();
    for (int i = 0; i < nn; i++) begin
      re = int'($urandom_range(2 * noise)) - noise;
      im = int'($urandom_range(2 * noise)) - noise;
      f.push_back(mk_sample(re, im));
    end
    pos = int'($urandom_range(nn - njam - 1));
    for (int i = 0; i < njam; i++) begin
      re = jam - int'($urandom_range(jam / 4));
      im = int'($urandom_range(jam / 2)) - jam / 4;
      if ($urandom_range(1)) re = -re;
      f[pos + i] = mk_sample(re, im);
    end
  endfunction

endpackage
