// ijas_dpsu: data processing selection unit (DPSU) of the iterative IJAS
// scheme.
//
// Sits between the ping-pong RAMs and the processing side. It keeps, per
// bank, the frame sum SUM_1 delivered by the accumulation unit and a
// `ready` flag saying the bank holds a complete frame not yet taken for
// processing. The controller takes a bank with `take`/`take_bank`; `sum1`
// is the stored SUM_1 of `sel_bank`; `rdata` selects the read data of RAM1
// or RAM2 by `rd_bank`. `overrun` is set (sticky) if a bank is completed
// again before its previous frame was taken, i.e. the processing clock was
// too slow for the input rate.
module ijas_dpsu
  import fdaj_pkg::*;
#(
  parameter int N      = 512,
  localparam int SUM_W = AMP_W + $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sum_valid,
  input  logic [SUM_W-1:0] sum,
  input  logic             done_bank,
  input  logic             take,
  input  logic             take_bank,
  input  logic             sel_bank,
  output logic [SUM_W-1:0] sum1,
  output logic [1:0]       ready,
  input  logic             rd_bank,
  input  fsample_t         ram1_rdata,
  input  fsample_t         ram2_rdata,
  output fsample_t         rdata,
  output logic             overrun
);

  logic [SUM_W-1:0] sum_reg [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_reg[0] <= '0;
      sum_reg[1] <= '0;
      ready      <= '0;
      overrun    <= 1'b0;
    end else begin
      if (take) ready[take_bank] <= 1'b0;
      if (sum_valid) begin
        sum_reg[done_bank] <= sum;
        ready[done_bank]   <= 1'b1;
        if (ready[done_bank] && !(take && take_bank == done_bank))
          overrun <= 1'b1;
      end
    end
  end

  assign sum1  = sum_reg[sel_bank];
  assign rdata = rd_bank ? ram2_rdata : ram1_rdata;

endmodule
