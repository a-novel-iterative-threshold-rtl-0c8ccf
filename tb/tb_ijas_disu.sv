// tb_ijas_disu: streams frames with random gaps through the ping-pong
// input selector and checks the write address, that writes alternate
// between RAM1 and RAM2 frame by frame (RAM1 first), the frame-end flag and
// the completed-bank record.
module tb_ijas_disu;
  localparam int N = 512;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0;
  logic [8:0] waddr;
  logic we1, we2, wlast, wbank, done_bank;

  ijas_disu dut (.*);

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
    int switches = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 5; fr++) begin
      for (int i = 0; i < N; i++) begin
        in_valid = 1;
        #1;
        chk(waddr == 9'(i), "write address");
        chk(we1 == (fr % 2 == 0) && we2 == (fr % 2 == 1), "bank write enables");
        chk(wlast == (i == N - 1), "frame end flag");
        @(negedge clk);
        in_valid = 0;
        #1;
        chk(!we1 && !we2, "no write without in_valid");
        if (i == N - 1) begin
          chk(done_bank == 1'(fr % 2), "completed bank recorded");
          chk(wbank == 1'((fr + 1) % 2), "bank switched");
          switches++;
        end
        if ($urandom_range(2) == 0) @(negedge clk);
      end
    end
    chk(switches == 5, "five bank switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
