// fft_model: behavioural (non-synthesizable) stand-in for the vendor
// N-point FFT / IFFT core the chain is built around, for simulation only.
//
// It collects frames of N complex samples (one per in_valid, frames back
// to back from reset), computes the DFT (INVERSE = 0) or inverse DFT
// (INVERSE = 1) in real arithmetic, scales the result by 2^-SHIFT the way a
// scaled-mode core does, rounds to 16 bits with saturation and plays the
// frame out in natural order, one sample every OUT_GAP clocks, starting
// one clock after the frame's last input sample.
module fft_model
  import fdaj_pkg::*;
#(
  parameter int N       = 512,
  parameter bit INVERSE = 1'b0,
  parameter int SHIFT   = 4,
  parameter int OUT_GAP = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  localparam real PI = 3.14159265358979323846;

  real   xr [N], xi [N];
  real   cw [N], sw [N];
  int    cnt = 0;
  cplx_t outq[$];
  int    gap = 0;

  function automatic data_t rnd_sat(real v);
    real r;
    r = (v >= 0.0) ? $floor(v + 0.5) : -$floor(-v + 0.5);
    if (r > 32767.0) r = 32767.0;
    if (r < -32768.0) r = -32768.0;
    return data_t'(int'(r));
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      cw[i] = $cos(2.0 * PI * i / N);
      sw[i] = $sin(2.0 * PI * i / N);
    end
  end

  task automatic transform();
    real ar, ai, s, scale;
    int idx;
    cplx_t o;
    scale = 1.0 / real'(1 << SHIFT);
    s = INVERSE ? 1.0 : -1.0;
    for (int k = 0; k < N; k++) begin
      ar = 0.0; ai = 0.0;
      for (int n = 0; n < N; n++) begin
        idx = (k * n) % N;
        ar += xr[n] * cw[idx] - s * xi[n] * sw[idx];
        ai += xi[n] * cw[idx] + s * xr[n] * sw[idx];
      end
      o.re = rnd_sat(ar * scale);
      o.im = rnd_sat(ai * scale);
      outq.push_back(o);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= 0;
      out_valid <= 1'b0;
      gap       <= 0;
    end else begin
      if (in_valid) begin
        xr[cnt] = real'(in_data.re);
        xi[cnt] = real'(in_data.im);
        if (cnt == N - 1) begin
          cnt <= 0;
          transform();
        end else begin
          cnt <= cnt + 1;
        end
      end
      out_valid <= 1'b0;
      if (gap > 0) gap <= gap - 1;
      else if (outq.size() > 0) begin
        out_valid <= 1'b1;
        out_data  <= outq.pop_front();
        gap       <= OUT_GAP - 1;
      end
    end
  end

endmodule
