// fdaj_pkg: widths, sample types and the scheme selector shared by the
// frequency-domain anti-jamming (FDAJ) chain.
//
// Time-domain samples and FFT real/imaginary parts are 16-bit two's
// complement; an amplitude |R(n)| is a 16-bit unsigned integer
// (floor(sqrt(re^2+im^2)) <= 46341 fits). The frame length N = 512 and the
// threshold coefficient K = 4 are the design's numbers; with both powers of
// two the threshold K*SUM/N is a plain right shift by log2(N)-log2(K) = 7.
// The widths are this implementation's choice.
package fdaj_pkg;

  localparam int DATA_W = 16;        // time samples, FFT re/im
  localparam int AMP_W  = 16;        // amplitude |R(n)|
  localparam int TH_W   = AMP_W + 2;  // threshold K*mean, K <= 4

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic        [AMP_W-1:0]  amp_t;
  typedef logic        [TH_W-1:0]   th_t;

  // One complex frequency-domain sample.
  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  // A frequency-domain sample together with its amplitude, as stored in
  // the IJAS frame RAMs.
  typedef struct packed {
    cplx_t s;
    amp_t  amp;
  } fsample_t;

  // Which implementation of the interference judgment and suppression unit
  // the chain uses.
  typedef enum logic {
    SCHEME_PIPELINE  = 1'b0,
    SCHEME_ITERATIVE = 1'b1
  } ijas_scheme_e;

  // Width of a frame's amplitude sum for frame length n.
  function automatic int sum_width(int n);
    return AMP_W + $clog2(n);
  endfunction

  // Shift that turns a frame sum into the threshold K*SUM/N.
  function automatic int th_shift(int n, int k);
    return $clog2(n) - $clog2(k);
  endfunction

  // The clamped real part R_r(n) = TH, saturated to the sample range.
  function automatic data_t sat_th(th_t th);
    if (th > th_t'(2**(DATA_W-1) - 1))
      return data_t'(2**(DATA_W-1) - 1);
    return data_t'(th);
  endfunction

endpackage
