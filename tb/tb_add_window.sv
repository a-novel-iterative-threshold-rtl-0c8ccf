// tb_add_window: random samples, including full-scale ones, through the
// window stage with random gaps; each output must equal
// floor(x * round(32768 * (0.54 - 0.46 cos(2 pi n / 512))) / 32768) one
// cycle later, with the frame index n counted over valid samples and
// out_sof on n = 0.
module tb_add_window;
  import fdaj_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, out_valid, out_sof;
  data_t in_data = '0, out_data;

  add_window dut (.*);

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
    longint p, e;
    int x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3 * N; k++) begin
      case (k % 7)
        0: x = 32767;
        1: x = -32768;
        default: x = int'($urandom_range(65535)) - 32768;
      endcase
      in_valid = 1; in_data = data_t'(x);
      p = longint'(x) * ref_window(k % N, N);
      e = p >>> 15;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid, "out_valid");
      chk(longint'(out_data) == e, $sformatf("n=%0d x=%0d got %0d want %0d", k % N, x, out_data, e));
      chk(out_sof == (k % N == 0), "start of frame");
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        chk(!out_valid, "no output without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
