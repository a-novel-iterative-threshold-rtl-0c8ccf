// ijas_pu: processing unit (PU) of the pipeline IJAS scheme; one
// judgment-and-suppression iteration over each frame.
//
// Incoming samples (real part, imaginary part, amplitude) are written into a
// frame RAM at addresses 0..N-1 while the accumulation unit (AU) sums their
// amplitudes. When the frame's last sample has been written, the threshold
// calculation unit (TCU) forms TH = K*SUM/N and the unit reads the frame
// back, one sample per clock, through the clamping unit (ICU) to the next
// stage. The next frame is written into the same RAM meanwhile: the read
// pointer starts at 0 when the write pointer does and never falls behind
// it, and the RAM reads before it writes, so one RAM of N words suffices.
//
// Timing: the frame's first output sample appears 3 cycles after its last
// input sample, and the output burst is N consecutive cycles long. Input
// samples may arrive on any cycles (in_valid), at most one per clock; a new
// frame must not complete within N cycles of the previous one (it cannot at
// one sample per clock). Frame boundaries are counted from reset.
// The structure (RAM, AU, TCU, ICU) follows the design; the single-RAM
// read-while-write arrangement and the cycle timing are this
// implementation's own.
module ijas_pu
  import fdaj_pkg::*;
#(
  parameter int N      = 512,
  parameter int K      = 4,
  localparam int AW    = $clog2(N),
  localparam int SUM_W = AMP_W + $clog2(N)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  fsample_t in_sample,
  output logic     out_valid,
  output fsample_t out_sample,
  output logic     clamped,   // output sample was judged interfered
  output th_t      th,        // threshold of the frame being read out
  output logic     th_valid   // pulses when th takes a new frame's value
);

  logic [AW-1:0]    waddr;
  logic             wlast;
  logic             sum_valid;
  logic [SUM_W-1:0] sum;

  logic             rd_active;
  logic [AW-1:0]    raddr;
  logic             rd_valid;
  fsample_t         rdata;

  assign wlast = waddr == AW'(N - 1);

  // Write side: frame address counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) waddr <= '0;
    else if (in_valid) waddr <= wlast ? '0 : waddr + 1'b1;
  end

  sample_ram #(.DEPTH(N)) u_ram (
    .clk   (clk),
    .we    (in_valid),
    .waddr (waddr),
    .wdata (in_sample),
    .re    (rd_active),
    .raddr (raddr),
    .rdata (rdata)
  );

  ijas_au #(.N(N)) u_au (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .last      (wlast),
    .amp       (in_sample.amp),
    .sum_valid (sum_valid),
    .sum       (sum)
  );

  ijas_tcu #(.N(N), .K(K)) u_tcu (
    .clk       (clk),
    .rst_n     (rst_n),
    .sum_valid (sum_valid),
    .sum       (sum),
    .th        (th),
    .th_valid  (th_valid)
  );

  // Read side: issue the first read in the cycle after the frame's last
  // write, the earliest cycle the next frame can write address 0. The read
  // datum reaches the ICU one cycle later, together with the registered
  // threshold.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      raddr     <= '0;
      rd_valid  <= 1'b0;
    end else begin
      rd_valid <= rd_active;
      if (in_valid && wlast) begin
        rd_active <= 1'b1;
        raddr     <= '0;
      end else if (rd_active) begin
        raddr <= raddr + 1'b1;
        if (raddr == AW'(N - 1)) rd_active <= 1'b0;
      end
    end
  end

  ijas_icu u_icu (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (rd_valid),
    .in_sample  (rdata),
    .th         (th),
    .out_valid  (out_valid),
    .out_sample (out_sample),
    .clamped    (clamped)
  );

endmodule
