// tb_ijas_icu: random samples against random thresholds, including
// |R| == TH and thresholds above the 16-bit range; checks (TH, 0) clamping,
// pass-through, the clamped flag and the one-cycle latency.
module tb_ijas_icu;
  import fdaj_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid, clamped;
  fsample_t in_sample = '0, out_sample;
  th_t th = '0;

  ijas_icu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fsample_t s, e;
    bit hit;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      s = fsample_t'({$urandom, $urandom});
      case (i % 4)
        0: th = th_t'(s.amp);                       // equality clamps
        1: th = th_t'($urandom_range(65535));
        2: th = th_t'(s.amp) + th_t'(1);             // just above: pass
        default: th = th_t'($urandom_range(20000));
      endcase
      hit = longint'(s.amp) >= longint'(th);
      e = s;
      if (hit) begin
        e.s.re = data_t'((th > 32767) ? 32767 : th);
        e.s.im = '0;
        e.amp  = amp_t'(th);
      end
      in_valid = 1; in_sample = s;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid after one cycle");
      chk(clamped == hit, "clamped flag");
      chk(out_sample == e, $sformatf("sample amp=%0d th=%0d", s.amp, th));
    end
    @(negedge clk);
    chk(!out_valid && !clamped, "idle after last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
