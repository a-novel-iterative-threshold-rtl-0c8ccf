// ijas_fr: flag register (FR) of the iterative IJAS scheme.
//
// N bits (512 in the design), one per frequency bin; FR[n] = 1 means bin n
// was clamped in the previous threshold pass, so its contribution to the
// running sum is currently that pass's threshold instead of |R(n)|. It
// lets the scheme update the sum without writing clamped samples back to
// the RAM. `clear` resets all flags at the start of a frame; one flag can
// be written per clock; the read is combinational.
module ijas_fr #(
  parameter int N   = 512,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wbit,
  input  logic [AW-1:0] raddr,
  output logic          rbit
);

  logic [N-1:0] flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     flags <= '0;
    else if (clear) flags <= '0;
    else if (we)    flags[waddr] <= wbit;
  end

  assign rbit = flags[raddr];

endmodule
