// ijas_au: accumulation unit (AU) of the IJAS unit.
//
// Adds up the amplitudes |R(n)| of the samples of one frame as they are
// written into the frame RAM. The caller marks the frame's last sample with
// `last`; one cycle later `sum_valid` pulses with `sum` holding the sum of
// all N amplitudes of the frame, and the accumulator has already restarted
// at zero for the next frame, so frames may follow back to back.
// The sum is wide enough never to overflow (AMP_W + log2 N bits).
module ijas_au
  import fdaj_pkg::*;
#(
  parameter int N     = 512,
  localparam int SUM_W = AMP_W + $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             last,
  input  amp_t             amp,
  output logic             sum_valid,
  output logic [SUM_W-1:0] sum
);

  logic [SUM_W-1:0] acc;
  logic [SUM_W-1:0] acc_next;

  assign acc_next = acc + SUM_W'(amp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= in_valid && last;
      if (in_valid) begin
        if (last) begin
          sum <= acc_next;
          acc <= '0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

endmodule
