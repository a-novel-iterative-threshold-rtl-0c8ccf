// tb_ijas_cu: random samples and thresholds through the comparison unit:
// ge must equal |R| >= TH and the output sample must be (TH, 0) when ge,
// the input sample otherwise, with saturation above 32767.
module tb_ijas_cu;
  import fdaj_pkg::*;
  int checks = 0, failures = 0;

  fsample_t in_sample;
  th_t th;
  logic ge;
  cplx_t out_sample;

  ijas_cu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hit;
    cplx_t e;
    for (int i = 0; i < 2000; i++) begin
      in_sample = fsample_t'({$urandom, $urandom});
      case (i % 3)
        0: th = th_t'(in_sample.amp);
        1: th = th_t'(in_sample.amp) + th_t'($urandom_range(3));
        default: th = th_t'($urandom_range(70000));
      endcase
      #1;
      hit = longint'(in_sample.amp) >= longint'(th);
      e = in_sample.s;
      if (hit) begin e.re = data_t'((th > 32767) ? 32767 : th); e.im = '0; end
      chk(ge == hit, "ge");
      chk(out_sample == e, $sformatf("out sample amp=%0d th=%0d", in_sample.amp, th));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
