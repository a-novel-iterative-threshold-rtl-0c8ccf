// tb_synthesis_output: two random streams A and B with B lagging A by a
// varying number of cycles, first steadily, then in bursts like the
// iterative IJAS output. Every output must be A[b-256] + B[b] (B[b] alone
// for b < 256), one cycle after b_valid, without overflow or underflow.
// A final phase starves A to check that underflow is reported.
module tb_synthesis_output;
  import fdaj_pkg::*;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, a_valid = 0, b_valid = 0, out_valid, overflow, underflow;
  data_t a_data = '0, b_data = '0;
  logic signed [16:0] out_data;

  synthesis_output dut (.*);

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

  data_t a_hist[$];
  data_t b_src[$];
  int nb = 0, na = 0, nout = 0;
  longint expq[$];
  logic bv_d = 0;

  always @(posedge clk) begin
    bv_d <= b_valid;
    if (rst_n) begin
      chk(out_valid == bv_d, "out_valid one cycle after b_valid");
      if (out_valid) begin
        chk(expq.size() > 0 && longint'(out_data) == expq[0], $sformatf("output %0d", nout));
        void'(expq.pop_front());
        nout++;
      end
    end
  end

  // Generate a stream of L samples per stream; B sample b is sent
  // LAG cycles (or more) after A sample b.
  initial begin
    int total;
    repeat (2) @(negedge clk);
    rst_n = 1;
    total = 8 * N;
    for (int i = 0; i < total; i++) begin a_hist.push_back(data_t'($urandom)); b_src.push_back(data_t'($urandom)); end
    // phase 1: steady, B lags A by 300 cycles; phase 2: bursts
    fork
      begin
        for (int i = 0; i < total; i++) begin
          a_valid = 1; a_data = a_hist[i]; na++;
          @(negedge clk);
          a_valid = 0;
          if (i >= 4 * N && (i % N) == N - 1) repeat (2 * N) @(negedge clk);
        end
      end
      begin
        repeat (300) @(negedge clk);
        for (int i = 0; i < total; i++) begin
          while (na < i + 1) @(negedge clk);
          b_valid = 1; b_data = b_src[i];
          expq.push_back((i < N / 2) ? longint'(b_src[i]) : longint'(b_src[i]) + longint'(a_hist[i - N / 2]));
          nb++;
          @(negedge clk);
          b_valid = 0;
          if (i >= 4 * N) @(negedge clk);
        end
      end
    join
    repeat (4) @(negedge clk);
    chk(nout == total, "all outputs");
    chk(!overflow && !underflow, "no overflow or underflow");
    // starve A: B samples beyond what A delivered must raise underflow
    for (int i = 0; i < N / 2 + 1; i++) begin
      b_valid = 1; b_data = '0;
      expq.push_back((i < N / 2) ? longint'(a_hist[total - N / 2 + i]) : 0);
      @(negedge clk);
    end
    b_valid = 0;
    @(negedge clk);
    chk(underflow, "underflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
