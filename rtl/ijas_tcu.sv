// ijas_tcu: threshold calculation unit (TCU) of the pipeline scheme.
//
// Turns a frame's amplitude sum into the judgment threshold
// TH = K * SUM / N. With K = 4 and N = 512 this is the design's 7-bit right
// shift of SUM. The threshold is registered when `sum_valid` pulses and is
// held until the next frame's sum arrives, so the clamping unit can use it
// for the whole read-out of the frame.
module ijas_tcu
  import fdaj_pkg::*;
#(
  parameter int N      = 512,
  parameter int K      = 4,
  localparam int SUM_W = AMP_W + $clog2(N),
  localparam int SHIFT = $clog2(N) - $clog2(K)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sum_valid,
  input  logic [SUM_W-1:0] sum,
  output th_t              th,
  output logic             th_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th       <= '0;
      th_valid <= 1'b0;
    end else begin
      th_valid <= sum_valid;
      if (sum_valid) th <= th_t'(sum >> SHIFT);
    end
  end

endmodule
