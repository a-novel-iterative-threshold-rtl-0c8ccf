// fdaj_top: frequency-domain anti-jamming (FDAJ) receiver front end with
// iterative-threshold interference suppression.
//
// The input sample stream takes two paths. Branch A windows it directly;
// branch B first delays it by N/2 samples, so its frames overlap branch
// A's by half a frame. In each branch a frame is multiplied by a Hamming
// window, transformed by an N-point FFT, given the amplitude of each bin
// and passed through the interference judgment and suppression (IJAS)
// unit: the threshold TH = 4 * mean amplitude is computed, every bin with
// |R(n)| >= TH is replaced by (TH, 0), and this is repeated NUM_ITER times
// with the threshold recomputed from the clamped spectrum. After the IFFT
// the two branches are overlap-added into the output stream.
//
// The FFT and IFFT are external cores (512-point, scaled, natural order,
// frames of N back to back): this module hands each branch's windowed
// frames out on win_*_ and takes the spectrum back on fft_*_, hands the
// suppressed spectrum out on ijas_* and takes the IFFT's real part back on
// ifft_*_. The cores' latency is free; both branches must use the same
// cores so that their latencies match.
//
// SCHEME selects the IJAS implementation: SCHEME_PIPELINE (default; one
// frame store per iteration, accepts a sample every clock) or
// SCHEME_ITERATIVE (ping-pong frame stores read NUM_ITER times; clk is
// the fast processing clock and input samples may come at most every
// NUM_ITER clocks). Both give identical outputs.
// Status: clamp_* pulses with each IJAS output bin judged interfered;
// th_first_* / th_last_* show the first and last threshold of a frame;
// overrun reports an input rate too high for the iterative scheme (the
// pipeline scheme cannot overrun, so there it is constant 0);
// synth_overflow/underflow report misaligned branches.
// Structure and numbers (N = 512, K = 4, three iterations, N/2 overlap)
// follow the design; widths, the window coefficients and the alignment
// logic are this implementation's own.
module fdaj_top
  import fdaj_pkg::*;
#(
  parameter int           N        = 512,
  parameter int           K        = 4,
  parameter int           NUM_ITER = 3,
  parameter ijas_scheme_e SCHEME   = SCHEME_PIPELINE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input samples
  input  logic                   in_valid,
  input  data_t                  in_data,
  // branch A: FFT core
  output logic                   win_a_valid,
  output data_t                  win_a_data,
  output logic                   win_a_sof,
  input  logic                   fft_a_valid,
  input  cplx_t                  fft_a_data,
  // branch A: IFFT core
  output logic                   ijas_a_valid,
  output cplx_t                  ijas_a_data,
  input  logic                   ifft_a_valid,
  input  data_t                  ifft_a_data,
  // branch B: FFT core
  output logic                   win_b_valid,
  output data_t                  win_b_data,
  output logic                   win_b_sof,
  input  logic                   fft_b_valid,
  input  cplx_t                  fft_b_data,
  // branch B: IFFT core
  output logic                   ijas_b_valid,
  output cplx_t                  ijas_b_data,
  input  logic                   ifft_b_valid,
  input  data_t                  ifft_b_data,
  // output samples
  output logic                   out_valid,
  output logic signed [DATA_W:0] out_data,
  // status
  output logic                   clamp_a,
  output logic                   clamp_b,
  output th_t                    th_first_a,
  output th_t                    th_last_a,
  output th_t                    th_first_b,
  output th_t                    th_last_b,
  output logic                   overrun,
  output logic                   synth_overflow,
  output logic                   synth_underflow
);

  // ---- branch B delay ----------------------------------------------------
  logic  dly_valid;
  data_t dly_data;

  half_frame_delay #(.N(N)) u_delay (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (dly_valid),
    .out_data  (dly_data)
  );

  // ---- windows -------------------------------------------------------------
  add_window #(.N(N)) u_win_a (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (win_a_valid),
    .out_data  (win_a_data),
    .out_sof   (win_a_sof)
  );

  add_window #(.N(N)) u_win_b (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (dly_valid),
    .in_data   (dly_data),
    .out_valid (win_b_valid),
    .out_data  (win_b_data),
    .out_sof   (win_b_sof)
  );

  // ---- amplitude and IJAS, per branch --------------------------------------
  logic     fft_valid [2];
  cplx_t    fft_data  [2];
  logic     amp_valid [2];
  fsample_t amp_data  [2];
  logic     ij_valid  [2];
  cplx_t    ij_data   [2];
  logic     ij_clamp  [2];
  th_t      ij_th1    [2];
  th_t      ij_thn    [2];
  logic     ij_ovr    [2];

  assign fft_valid[0] = fft_a_valid;
  assign fft_data[0]  = fft_a_data;
  assign fft_valid[1] = fft_b_valid;
  assign fft_data[1]  = fft_b_data;

  for (genvar b = 0; b < 2; b++) begin : g_branch
    amp_unit u_amp (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (fft_valid[b]),
      .in_sample  (fft_data[b]),
      .out_valid  (amp_valid[b]),
      .out_sample (amp_data[b])
    );

    if (SCHEME == SCHEME_PIPELINE) begin : g_pipe
      ijas_pipeline #(.N(N), .K(K), .NUM_ITER(NUM_ITER)) u_ijas (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_valid   (amp_valid[b]),
        .in_sample  (amp_data[b]),
        .out_valid  (ij_valid[b]),
        .out_sample (ij_data[b]),
        .clamped    (ij_clamp[b]),
        .th_first   (ij_th1[b]),
        .th_last    (ij_thn[b])
      );
      assign ij_ovr[b] = 1'b0;
    end else begin : g_iter
      ijas_iterative #(.N(N), .K(K), .NUM_ITER(NUM_ITER)) u_ijas (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_valid   (amp_valid[b]),
        .in_sample  (amp_data[b]),
        .out_valid  (ij_valid[b]),
        .out_sample (ij_data[b]),
        .clamped    (ij_clamp[b]),
        .th_first   (ij_th1[b]),
        .th_last    (ij_thn[b]),
        .overrun    (ij_ovr[b])
      );
    end
  end

  assign ijas_a_valid = ij_valid[0];
  assign ijas_a_data  = ij_data[0];
  assign ijas_b_valid = ij_valid[1];
  assign ijas_b_data  = ij_data[1];
  assign clamp_a      = ij_clamp[0];
  assign clamp_b      = ij_clamp[1];
  assign th_first_a   = ij_th1[0];
  assign th_last_a    = ij_thn[0];
  assign th_first_b   = ij_th1[1];
  assign th_last_b    = ij_thn[1];
  assign overrun      = ij_ovr[0] || ij_ovr[1];

  // ---- overlap-add synthesis ---------------------------------------------
  synthesis_output #(.N(N)) u_synth (
    .clk       (clk),
    .rst_n     (rst_n),
    .a_valid   (ifft_a_valid),
    .a_data    (ifft_a_data),
    .b_valid   (ifft_b_valid),
    .b_data    (ifft_b_data),
    .out_valid (out_valid),
    .out_data  (out_data),
    .overflow  (synth_overflow),
    .underflow (synth_underflow)
  );

endmodule
