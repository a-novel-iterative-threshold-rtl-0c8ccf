// tb_ijas_depth: both IJAS schemes at iteration counts other than the
// default three (1, 2, 4 and 5), each against the reference multi-pass
// algorithm. This covers the generalisation of the iterative scheme: no
// flag-register pass at NUM_ITER = 1, and several middle passes at 4 and 5,
// where a bin flagged earlier contributes the previous threshold to the sum
// correction. Each count runs in its own ijas_depth_bench, with input at one
// sample per NUM_ITER clocks. The testbench ends when all benches are done,
// or when the watchdog expires.
module tb_ijas_depth;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NB = 4;
  logic [NB-1:0] done;
  int checks[NB], failures[NB];

  ijas_depth_bench #(.NUM_ITER(1)) b1 (.clk(clk), .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  ijas_depth_bench #(.NUM_ITER(2)) b2 (.clk(clk), .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  ijas_depth_bench #(.NUM_ITER(4)) b4 (.clk(clk), .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  ijas_depth_bench #(.NUM_ITER(5)) b5 (.clk(clk), .done(done[3]), .checks(checks[3]), .failures(failures[3]));

  function automatic int total(input int v[NB]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    fork
      begin
        wait (&done);
        $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
      end
      begin
        repeat (40000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
      end
    join_any
    $finish;
  end
endmodule
