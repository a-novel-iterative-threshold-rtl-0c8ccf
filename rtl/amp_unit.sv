// amp_unit: amplitude |R(n)| of each FFT output sample.
//
// The IJAS unit stores every frequency-domain sample together with its
// amplitude. This unit computes amp = floor(sqrt(re^2 + im^2)) exactly:
// stage 1 forms the 32-bit squared magnitude, stage 2 takes its integer
// square root with a bit-by-bit (restoring) method unrolled in
// combinational logic. The sample's real and imaginary parts travel along.
// The design only says the amplitude is stored with the sample; the exact
// integer square root is this implementation's choice.
//
// Timing: two cycles from in_valid to out_valid, one sample per clock.
module amp_unit
  import fdaj_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  cplx_t    in_sample,
  output logic     out_valid,
  output fsample_t out_sample
);

  logic [2*DATA_W-1:0]        sq;
  cplx_t                      s1;
  logic                       v1;
  logic signed [2*DATA_W-1:0] re_w, im_w;

  assign re_w = (2*DATA_W)'(in_sample.re);
  assign im_w = (2*DATA_W)'(in_sample.im);

  // Integer square root of a 32-bit value, result 16 bits.
  function automatic amp_t isqrt(logic [2*DATA_W-1:0] x);
    logic [2*DATA_W-1:0] rem;
    logic [2*DATA_W-1:0] root;
    logic [2*DATA_W-1:0] bitv;
    rem  = x;
    root = '0;
    bitv = {2'b01, {(2*DATA_W-2){1'b0}}};
    for (int i = 0; i < DATA_W; i++) begin
      if (rem >= root + bitv) begin
        rem  = rem - (root + bitv);
        root = (root >> 1) + bitv;
      end else begin
        root = root >> 1;
      end
      bitv = bitv >> 2;
    end
    return amp_t'(root);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1         <= 1'b0;
      s1         <= '0;
      sq         <= '0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        s1 <= in_sample;
        sq <= unsigned'(re_w * re_w) + unsigned'(im_w * im_w);
      end
      out_valid <= v1;
      if (v1) begin
        out_sample.s   <= s1;
        out_sample.amp <= isqrt(sq);
      end
    end
  end

endmodule
