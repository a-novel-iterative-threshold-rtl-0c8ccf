// sample_ram: frame store of the IJAS unit (RAM1..RAM3 of the pipeline
// scheme, RAM1/RAM2 of the iterative scheme).
//
// DEPTH words of one fsample_t each (real part, imaginary part, amplitude),
// 512 deep as in the design. One write port and one read port on the same
// clock. The read is registered (one cycle of latency) and read-first: a
// read and a write of the same address in one cycle return the old word.
// The processing units rely on this to read frame k at address n in the
// very cycle that frame k+1 is written there. The read-first behaviour and
// the simple dual-port organisation are this implementation's choice.
module sample_ram
  import fdaj_pkg::*;
#(
  parameter int DEPTH = 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  fsample_t       wdata,
  input  logic           re,
  input  logic [AW-1:0]  raddr,
  output fsample_t       rdata
);

  fsample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
