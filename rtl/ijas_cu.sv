// ijas_cu: comparison unit (CU) of the iterative IJAS scheme.
//
// Combinational. Compares the amplitude |R(n)| read from the frame RAM with
// the current threshold (`ge` = |R(n)| >= TH). In the threshold passes the
// result goes to the flag register and the sum modification unit; in the
// final pass `out_sample` is the sample to feed to the IFFT: (TH, 0) when
// the sample is judged interfered, the original sample otherwise. The real
// part is saturated to the 16-bit sample range should TH exceed it.
module ijas_cu
  import fdaj_pkg::*;
(
  input  fsample_t in_sample,
  input  th_t      th,
  output logic     ge,
  output cplx_t    out_sample
);

  assign ge = th_t'(in_sample.amp) >= th;

  always_comb begin
    out_sample = in_sample.s;
    if (ge) begin
      out_sample.re = sat_th(th);
      out_sample.im = '0;
    end
  end

endmodule
