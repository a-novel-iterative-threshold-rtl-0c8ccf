// tb_half_frame_delay: random samples with random gaps; each output must
// be the sample that entered 256 valid samples earlier (0 before that),
// one cycle after its in_valid.
module tb_half_frame_delay;
  import fdaj_pkg::*;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid;
  data_t in_data = '0, out_data;
  data_t hist[$];

  half_frame_delay dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4 * N; k++) begin
      in_valid = 1; in_data = data_t'($urandom);
      hist.push_back(in_data);
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid");
      chk(out_data == ((k < N / 2) ? data_t'(0) : hist[k - N / 2]),
          $sformatf("sample %0d", k));
      if ($urandom_range(2) == 0) begin
        @(negedge clk);
        chk(!out_valid, "idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
