// ijas_smu: sum modification unit (SMU) of the iterative IJAS scheme.
//
// Holds the current frame sum SUM_i and threshold TH_i = K*SUM_i/N and
// updates them pass by pass with the simplified recursion
// SUM_{i+1} = SUM_i - RSUM instead of re-adding all amplitudes. During a
// threshold pass, for each sample judged interfered (ge) RSUM grows by
// |R(n)| - TH_i if the sample was not clamped before (fr = 0), or by
// TH_{i-1} - TH_i if it was (fr = 1). On the pass's last sample the unit
// forms SUM_{i+1}, TH_{i+1} and clears RSUM, so TH_{i+1} is in place for
// the next pass's first comparison in the following cycle.
// `load` starts a frame with SUM_1 and TH_1 = K*SUM_1/N. `th_update`
// pulses in the cycle after a new threshold was formed.
module ijas_smu
  import fdaj_pkg::*;
#(
  parameter int N      = 512,
  parameter int K      = 4,
  localparam int SUM_W = AMP_W + $clog2(N),
  localparam int SHIFT = $clog2(N) - $clog2(K)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [SUM_W-1:0] sum1,
  input  logic             acc_en,   // a threshold-pass sample is compared
  input  logic             last,     // ... and it is the pass's last one
  input  logic             ge,
  input  logic             fr,
  input  amp_t             amp,
  output th_t              th_cur,
  output logic [SUM_W-1:0] sum_cur,
  output logic             th_update
);

  th_t              th_prev;
  logic [SUM_W-1:0] rsum;
  logic [SUM_W-1:0] delta;
  logic [SUM_W-1:0] sum_next;

  always_comb begin
    delta = '0;
    if (ge) delta = fr ? SUM_W'(th_prev - th_cur) : SUM_W'(th_t'(amp) - th_cur);
  end

  assign sum_next = sum_cur - (rsum + delta);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_cur    <= '0;
      th_prev   <= '0;
      sum_cur   <= '0;
      rsum      <= '0;
      th_update <= 1'b0;
    end else begin
      th_update <= 1'b0;
      if (load) begin
        sum_cur <= sum1;
        th_cur  <= th_t'(sum1 >> SHIFT);
        th_prev <= '0;
        rsum    <= '0;
      end else if (acc_en) begin
        if (last) begin
          sum_cur   <= sum_next;
          th_prev   <= th_cur;
          th_cur    <= th_t'(sum_next >> SHIFT);
          rsum      <= '0;
          th_update <= 1'b1;
        end else begin
          rsum <= rsum + delta;
        end
      end
    end
  end

endmodule
