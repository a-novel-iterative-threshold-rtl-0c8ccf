// ijas_icu: interference clamping unit (ICU) of the pipeline scheme.
//
// Judges one frequency-domain sample against the threshold TH and
// suppresses it by threshold clamping: if |R(n)| >= TH the sample is
// replaced by R_r = TH, R_i = 0 (its amplitude becomes TH); otherwise it is
// passed on unchanged. The real part is saturated to the 16-bit sample
// range in the rare case TH exceeds it; the stored amplitude keeps the
// exact TH. One registered stage: the result appears one cycle after
// `in_valid`, with `clamped` telling whether the sample was judged
// interfered.
module ijas_icu
  import fdaj_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  fsample_t in_sample,
  input  th_t      th,
  output logic     out_valid,
  output fsample_t out_sample,
  output logic     clamped
);

  logic hit;
  assign hit = th_t'(in_sample.amp) >= th;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
      clamped    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      clamped   <= in_valid && hit;
      if (in_valid) begin
        if (hit) begin
          out_sample.s.re <= sat_th(th);
          out_sample.s.im <= '0;
          out_sample.amp  <= amp_t'(th);
        end else begin
          out_sample <= in_sample;
        end
      end
    end
  end

endmodule
