// tb_ijas_fr: random writes to the 512-bit flag register against a model,
// combinational reads, and the synchronous clear of all flags.
module tb_ijas_fr;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, clear = 0, we = 0, wbit = 0, rbit;
  logic [8:0] waddr = '0, raddr = '0;
  bit model [N];

  ijas_fr dut (.*);

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
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 2000; i++) begin
        we = 1; waddr = 9'($urandom_range(N - 1)); wbit = 1'($urandom);
        model[waddr] = wbit;
        @(negedge clk);
        we = 0;
        raddr = 9'($urandom_range(N - 1));
        #1 chk(rbit == model[raddr], "random read");
      end
      for (int i = 0; i < N; i++) begin
        raddr = 9'(i); #1 chk(rbit == model[i], "full read");
      end
      clear = 1; we = 1; waddr = 0; wbit = 1; @(negedge clk); clear = 0; we = 0;
      foreach (model[i]) model[i] = 0;
      for (int i = 0; i < N; i++) begin
        raddr = 9'(i); #1 chk(rbit == 1'b0, "cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
