// half_frame_delay: the "N/2 delayed" element of the overlapped-window
// chain.
//
// Delays the input sample stream by DELAY = N/2 samples (256 in the
// design), counted in valid samples rather than clocks, so the second
// branch sees frames that start half a frame later than the first
// branch's. Implemented as a circular buffer of DELAY words that is read
// before it is written. Until DELAY samples have gone in, the output is 0.
//
// Timing: out_valid/out_data one cycle after in_valid; out_data is the
// sample that entered DELAY valid samples earlier.
module half_frame_delay
  import fdaj_pkg::*;
#(
  parameter int N     = 512,
  parameter int DELAY = N / 2,
  localparam int AW   = $clog2(DELAY)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data
);

  data_t         mem [DELAY];
  logic [AW-1:0] ptr;
  logic          filled;

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      filled    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= filled ? mem[ptr] : '0;
        if (ptr == AW'(DELAY - 1)) begin
          ptr    <= '0;
          filled <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
