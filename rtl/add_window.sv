// add_window: "adding window" stage in front of each FFT.
//
// Multiplies the incoming time-domain sample stream, frame by frame, by a
// generalized Hamming window of N points (512 in the design):
//   w(n) = 0.54 - 0.46 * cos(2*pi*n/N),  n = 0..N-1,
// stored as unsigned Q1.15 coefficients round(32768 * w(n)) in a ROM read
// from hamming_window_512.hex. The periodic form is used so that two
// windows overlapped by N/2 add up to the constant 1.08, which keeps the
// overlap-add synthesis distortion-free. The product is scaled back by
// 2^-15 with an arithmetic shift (rounding toward minus infinity).
// The design names only a "generalized Hamming window"; the coefficients
// 0.54/0.46, the periodic form and the Q1.15 format are this
// implementation's choices.
//
// Interface: one sample per in_valid; frames are counted from reset.
// Timing: out_data/out_valid one cycle after in_valid; out_sof marks the
// first sample (n = 0) of each frame.
module add_window
  import fdaj_pkg::*;
#(
  parameter int    N      = 512,
  parameter string COEF_FILE = "rtl/hamming_window_512.hex",
  localparam int   AW     = $clog2(N)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data,
  output logic  out_sof
);

  logic [15:0] coef [N];

  initial $readmemh(COEF_FILE, coef);

  logic [AW-1:0]        n;
  logic signed [32:0]   prod;

  assign prod = in_data * $signed({1'b0, coef[n]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n         <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= data_t'(prod >>> 15);
        out_sof  <= n == '0;
        n        <= (n == AW'(N - 1)) ? '0 : n + 1'b1;
      end
    end
  end

endmodule
