// fdaj_bench: one fdaj_top (pipeline scheme, NUM_ITER iterations) with
// its harness in non-standalone mode, so a testbench can run several
// configurations on the same stimulus and compare them.
module fdaj_bench
  import fdaj_pkg::*;
#(
  parameter int NUM_ITER = 3,
  parameter int SEED     = 1,
  parameter int NFRAME   = 16
) (
  output logic done,
  output int   checks,
  output int   failures,
  output real  corr_in,
  output real  corr_out,
  output real  pow_ratio
);

  logic clk, rst_n, in_valid;
  data_t in_data;
  logic win_a_valid, win_a_sof, fft_a_valid, ijas_a_valid, ifft_a_valid;
  data_t win_a_data, ifft_a_data;
  cplx_t fft_a_data, ijas_a_data;
  logic win_b_valid, win_b_sof, fft_b_valid, ijas_b_valid, ifft_b_valid;
  data_t win_b_data, ifft_b_data;
  cplx_t fft_b_data, ijas_b_data;
  logic out_valid;
  logic signed [DATA_W:0] out_data;
  logic clamp_a, clamp_b, overrun, synth_overflow, synth_underflow;
  th_t th_first_a, th_last_a, th_first_b, th_last_b;

  fdaj_top #(.NUM_ITER(NUM_ITER)) dut (.*);

  fdaj_harness #(.SCHEME(SCHEME_PIPELINE), .GAP(1), .NUM_ITER(NUM_ITER),
                 .SEED(SEED), .NFRAME(NFRAME), .STANDALONE(1'b0)) harness (.*);

endmodule
