// tb_fdaj_top_iter: end-to-end test of fdaj_top with the iterative IJAS scheme
// (N = 512, K = 4, three iterations), one input
// sample every third clock (f_s = 3 f_in), eight frames of interfered input. See fdaj_harness
// for the stimulus and the checks.
module tb_fdaj_top_iter;
  import fdaj_pkg::*;

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
  logic done;
  int checks, failures;
  real corr_in, corr_out, pow_ratio;

  fdaj_top #(.SCHEME(SCHEME_ITERATIVE)) dut (.*);

  fdaj_harness #(.SCHEME(SCHEME_ITERATIVE), .GAP(3)) harness (.*);

  // Backstop in case the harness never reaches its end of test.
  initial begin
    #20ms;
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

endmodule
