// tb_ijas_au: feeds frames of random amplitudes with random gaps and checks
// that each frame sum appears exactly one cycle after the frame's last
// sample, and that back-to-back frames do not mix.
module tb_ijas_au;
  import fdaj_pkg::*;
  localparam int N = 512;
  localparam int SUM_W = AMP_W + 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, last = 0, sum_valid;
  amp_t amp = '0;
  logic [SUM_W-1:0] sum;
  longint expected[$];

  ijas_au dut (.*);

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

  // monitor: sum_valid must follow the last sample by one cycle
  logic last_d = 0;
  int   nsums = 0;
  always @(posedge clk) begin
    last_d <= in_valid && last;
    if (rst_n) begin
      chk(sum_valid == last_d, "sum_valid one cycle after last");
      if (sum_valid) begin
        chk(expected.size() > 0 && longint'(sum) == expected[0],
            $sformatf("frame sum %0d", sum));
        if (expected.size() > 0) void'(expected.pop_front());
        nsums++;
      end
    end
  end

  initial begin
    longint acc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      acc = 0;
      for (int i = 0; i < N; i++) begin
        in_valid = 1; last = (i == N - 1);
        amp = (f == 4) ? amp_t'(16'hffff) : amp_t'($urandom);
        acc += longint'(amp);
        if (i == N - 1) expected.push_back(acc);
        @(negedge clk);
        in_valid = 0; last = 0;
        if (f == 1 && $urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
      end
    end
    repeat (4) @(negedge clk);
    chk(nsums == 5, "five sums delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
