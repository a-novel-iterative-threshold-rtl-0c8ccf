// tb_amp_unit: random and extreme complex samples at one per clock; the
// amplitude must be exactly floor(sqrt(re^2 + im^2)) with re/im carried
// along, two cycles after the input.
module tb_amp_unit;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid;
  cplx_t in_sample = '0;
  fsample_t out_sample;
  fsample_t expq[$];

  amp_unit dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic v1 = 0, v2 = 0;
  always @(posedge clk) begin
    v1 <= in_valid; v2 <= v1;
    if (rst_n) begin
      chk(out_valid == v2, "two-cycle latency");
      if (out_valid) begin
        chk(expq.size() > 0 && out_sample == expq[0],
            $sformatf("re=%0d im=%0d amp=%0d want %0d", out_sample.s.re,
                      out_sample.s.im, out_sample.amp, expq[0].amp));
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    int re, im;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      case (k % 10)
        0: begin re = -32768; im = -32768; end
        1: begin re = 32767; im = -32768; end
        2: begin re = 0; im = 0; end
        3: begin re = int'($urandom_range(200)) - 100; im = int'($urandom_range(200)) - 100; end
        default: begin re = int'($urandom_range(65535)) - 32768; im = int'($urandom_range(65535)) - 32768; end
      endcase
      in_valid = 1;
      in_sample.re = data_t'(re); in_sample.im = data_t'(im);
      expq.push_back(mk_sample(re, im));
      @(negedge clk);
      in_valid = 0;
      if (k % 50 == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(expq.size() == 0, "all samples out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
