// tb_sample_ram: fills the frame RAM with random words, reads them back
// (one-cycle registered read), and checks the read-first behaviour when a
// read and a write hit the same address in one cycle.
module tb_sample_ram;
  import fdaj_pkg::*;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [8:0] waddr = '0, raddr = '0;
  fsample_t wdata = '0, rdata;
  fsample_t model [N];

  sample_ram dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      we = 1; waddr = 9'(i); wdata = fsample_t'({$urandom, $urandom});
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < N; i++) begin
      re = 1; raddr = 9'((i * 37) % N);
      @(negedge clk);
      chk(rdata == model[(i * 37) % N], $sformatf("read addr %0d", (i * 37) % N));
    end
    // hold: re = 0 keeps the last output
    re = 0; @(negedge clk);
    chk(rdata == model[((N - 1) * 37) % N], "read data held when re=0");
    // read-first on collision
    for (int i = 0; i < 64; i++) begin
      int a;
      a = int'($urandom_range(N - 1));
      re = 1; raddr = 9'(a); we = 1; waddr = 9'(a); wdata = fsample_t'({$urandom, $urandom});
      @(negedge clk);
      chk(rdata == model[a], "read-first on same-address write");
      model[a] = wdata;
    end
    we = 0;
    for (int i = 0; i < N; i++) begin
      raddr = 9'(i); @(negedge clk);
      chk(rdata == model[i], "final read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
