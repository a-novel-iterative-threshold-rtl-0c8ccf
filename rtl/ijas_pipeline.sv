// ijas_pipeline: interference judgment and suppression (IJAS), pipeline
// scheme.
//
// NUM_ITER processing units (three in the design: PU1, PU2, PU3) are
// chained; each stores a frame, computes its own threshold from the
// amplitudes it receives and clamps the frame before passing it on, so
// stage i works on the output of stage i-1 exactly as the iterative
// threshold algorithm prescribes (TH_1 from the raw spectrum, TH_2 from the
// once-clamped spectrum, and so on). The last stage feeds the IFFT.
//
// Interface: one frequency-domain sample (with its amplitude) per in_valid,
// frames of N samples back to back counted from reset; out_valid marks
// clamped output samples. clamped flags an output sample the last stage
// judged interfered; th_first / th_last are the thresholds of the first and
// last stage for the frames they are currently processing.
// Timing: a frame's first output sample leaves NUM_ITER*(N+2) cycles after
// its first input sample when samples arrive on every clock.
module ijas_pipeline
  import fdaj_pkg::*;
#(
  parameter int N        = 512,
  parameter int K        = 4,
  parameter int NUM_ITER = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  fsample_t in_sample,
  output logic     out_valid,
  output cplx_t    out_sample,
  output logic     clamped,
  output th_t      th_first,
  output th_t      th_last
);

  logic     v   [NUM_ITER+1];
  fsample_t s   [NUM_ITER+1];
  logic     clp [NUM_ITER];
  th_t      th  [NUM_ITER];

  assign v[0] = in_valid;
  assign s[0] = in_sample;

  for (genvar i = 0; i < NUM_ITER; i++) begin : g_pu
    ijas_pu #(.N(N), .K(K)) u_pu (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (v[i]),
      .in_sample  (s[i]),
      .out_valid  (v[i+1]),
      .out_sample (s[i+1]),
      .clamped    (clp[i]),
      .th         (th[i]),
      .th_valid   ()
    );
  end

  assign out_valid  = v[NUM_ITER];
  assign out_sample = s[NUM_ITER].s;
  assign clamped    = clp[NUM_ITER-1];
  assign th_first   = th[0];
  assign th_last    = th[NUM_ITER-1];

endmodule
