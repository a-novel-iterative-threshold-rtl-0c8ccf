// ijas_disu: data input selection unit (DISU) of the iterative IJAS scheme.
//
// Ping-pong input side: frames of N samples from the FFT are written
// alternately into RAM1 (bank 0) and RAM2 (bank 1). The unit keeps the
// write address and the bank being filled; when a frame's last sample is
// written (`wlast` with in_valid) it switches banks, and `done_bank`
// records which bank has just been completed (valid from the next cycle
// on, when the accumulation unit delivers that frame's sum).
// Bank 0 is filled first after reset, as in the design.
module ijas_disu #(
  parameter int N   = 512,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic [AW-1:0] waddr,
  output logic          we1,        // write RAM1 (bank 0)
  output logic          we2,        // write RAM2 (bank 1)
  output logic          wlast,      // this write completes a frame
  output logic          wbank,      // bank being filled
  output logic          done_bank   // bank completed most recently
);

  assign wlast = waddr == AW'(N - 1);
  assign we1   = in_valid && !wbank;
  assign we2   = in_valid &&  wbank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr     <= '0;
      wbank     <= 1'b0;
      done_bank <= 1'b0;
    end else if (in_valid) begin
      if (wlast) begin
        waddr     <= '0;
        wbank     <= !wbank;
        done_bank <= wbank;
      end else begin
        waddr <= waddr + 1'b1;
      end
    end
  end

endmodule
