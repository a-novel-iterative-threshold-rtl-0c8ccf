// synthesis_output: overlap-add synthesis of the two branches.
//
// Branch A processes frames that start at input samples 0, N, 2N, ...;
// branch B, fed through the N/2 delay, frames that start N/2 samples
// later. Stream position b of branch B's IFFT output holds input time
// b - N/2, the same time as stream position b - N/2 of branch A. The unit
// therefore queues branch A's samples in a FIFO that starts with N/2
// zeros (A has no samples for the first half frame) and, for every
// branch B sample, outputs
//   out = A[b - N/2] + B[b].
// With the periodic Hamming window the two overlapped windows sum to 1.08
// at every sample; the sum is not rescaled (one extra output bit).
// The FIFO (FIFO_DEPTH = 2N words) absorbs the offset between the two
// branches and the burstiness of the iterative IJAS scheme. `overflow`
// (sticky) reports a push into a full FIFO, `underflow` (sticky) a B
// sample with no A sample to pair with; neither happens when both branches
// have the same latency.
// The design names the overlap-add synthesis; the FIFO alignment and the
// unscaled sum are this implementation's choices.
//
// Timing: out_valid/out_data one cycle after b_valid.
module synthesis_output
  import fdaj_pkg::*;
#(
  parameter int N          = 512,
  parameter int FIFO_DEPTH = 2 * N,
  localparam int AW        = $clog2(FIFO_DEPTH),
  localparam int PW        = $clog2(N / 2 + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  a_valid,
  input  data_t                 a_data,
  input  logic                  b_valid,
  input  data_t                 b_data,
  output logic                  out_valid,
  output logic signed [DATA_W:0] out_data,
  output logic                  overflow,
  output logic                  underflow
);

  data_t         fifo [FIFO_DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic [PW-1:0] lead;      // B samples paired with the initial zeros
  logic          lead_done;
  logic          push, pop;
  data_t         a_head;

  assign lead_done = lead == PW'(N / 2);
  assign push      = a_valid && count != (AW+1)'(FIFO_DEPTH);
  assign pop       = b_valid && lead_done && count != '0;
  assign a_head    = fifo[rptr];

  always_ff @(posedge clk) begin
    if (push) fifo[wptr] <= a_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      lead      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      if (a_valid && !push) overflow <= 1'b1;
      out_valid <= b_valid;
      if (b_valid) begin
        if (!lead_done) begin
          lead     <= lead + 1'b1;
          out_data <= (DATA_W+1)'(b_data);
        end else if (pop) begin
          out_data <= (DATA_W+1)'(a_head) + (DATA_W+1)'(b_data);
        end else begin
          underflow <= 1'b1;
          out_data  <= (DATA_W+1)'(b_data);
        end
      end
    end
  end

endmodule
