// tb_ijas_dpsu: checks that frame sums are stored per bank, the ready
// flags are set by a completed frame and cleared when the bank is taken,
// the RAM read data selection, and that completing a bank twice without
// taking it raises the sticky overrun flag.
module tb_ijas_dpsu;
  import fdaj_pkg::*;
  localparam int N = 512;
  localparam int SUM_W = AMP_W + 9;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, sum_valid = 0, done_bank = 0, take = 0, take_bank = 0;
  logic sel_bank = 0, rd_bank = 0, overrun;
  logic [SUM_W-1:0] sum = '0, sum1;
  logic [1:0] ready;
  fsample_t ram1_rdata = '0, ram2_rdata = '0, rdata;

  ijas_dpsu dut (.*);

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
    logic [SUM_W-1:0] s0, s1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ready == 2'b00 && !overrun, "reset state");
    for (int k = 0; k < 50; k++) begin
      s0 = SUM_W'($urandom); s1 = SUM_W'($urandom);
      sum_valid = 1; done_bank = 0; sum = s0; @(negedge clk);
      sum_valid = 0;
      chk(ready == 2'b01, "bank 0 ready");
      sel_bank = 0; #1 chk(sum1 == s0, "bank 0 sum");
      take = 1; take_bank = 0; @(negedge clk); take = 0;
      chk(ready == 2'b00, "bank 0 taken");
      sum_valid = 1; done_bank = 1; sum = s1; @(negedge clk);
      sum_valid = 0;
      chk(ready == 2'b10, "bank 1 ready");
      sel_bank = 1; #1 chk(sum1 == s1, "bank 1 sum");
      sel_bank = 0; #1 chk(sum1 == s0, "bank 0 sum kept");
      // a completed bank taken in the same cycle is no overrun
      take = 1; take_bank = 1; sum_valid = 1; done_bank = 1; sum = s0; @(negedge clk);
      take = 0; sum_valid = 0;
      chk(ready == 2'b10 && !overrun, "retake and refill in one cycle");
      take = 1; take_bank = 1; @(negedge clk); take = 0;
      ram1_rdata = fsample_t'({$urandom, $urandom});
      ram2_rdata = fsample_t'({$urandom, $urandom});
      rd_bank = 0; #1 chk(rdata == ram1_rdata, "RAM1 selected");
      rd_bank = 1; #1 chk(rdata == ram2_rdata, "RAM2 selected");
    end
    chk(!overrun, "no overrun so far");
    sum_valid = 1; done_bank = 0; @(negedge clk);
    sum_valid = 1; done_bank = 0; @(negedge clk);
    sum_valid = 0; @(negedge clk);
    chk(overrun, "overrun on refilled bank");
    @(negedge clk);
    chk(overrun, "overrun sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
