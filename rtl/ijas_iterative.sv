// ijas_iterative: interference judgment and suppression (IJAS), iterative
// scheme.
//
// One frame RAM pair instead of one RAM per iteration. The data input
// selection unit (DISU) writes incoming frames alternately into RAM1 and
// RAM2 while the accumulation unit (AU) forms SUM_1. While the next frame
// fills the other RAM, the completed one is read NUM_ITER times (three in
// the design) through the comparison unit (CU):
//   passes 1..NUM_ITER-1  compare |R(n)| with TH_i, keep a per-bin flag in
//                         the flag register (FR) and let the sum
//                         modification unit (SMU) derive SUM_{i+1} and
//                         TH_{i+1} without writing anything back;
//   last pass             clamp with the final threshold and send every
//                         sample to the IFFT.
// The result equals NUM_ITER chained clamping stages (ijas_pipeline).
//
// Clocking: one clock, the fast processing clock f_s. Input samples come at
// most once every NUM_ITER clocks on average (f_s >= NUM_ITER * f_in);
// `in_valid` marks them. The passes follow each other without a gap, so at
// exactly that rate the unit keeps up indefinitely; `overrun` is a sticky
// flag raised if a RAM is refilled before its frame was taken.
// Timing: a frame's first output sample leaves (NUM_ITER-1)*N + 5 cycles
// after its last input sample; its N output samples come on consecutive
// clocks. Frame boundaries are counted from reset.
// The units and their rules follow the design; the single clock with an
// input strobe and the cycle timing are this implementation's choice.
module ijas_iterative
  import fdaj_pkg::*;
#(
  parameter int N        = 512,
  parameter int K        = 4,
  parameter int NUM_ITER = 3,
  localparam int AW      = $clog2(N),
  localparam int SUM_W   = AMP_W + $clog2(N),
  localparam int PW      = $clog2(NUM_ITER + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  fsample_t in_sample,
  output logic     out_valid,
  output cplx_t    out_sample,
  output logic     clamped,     // output sample was judged interfered
  output th_t      th_first,    // TH_1 of the frame being processed
  output th_t      th_last,     // current threshold (TH_NUM_ITER in the last pass)
  output logic     overrun
);

  // ---- input side: DISU, RAMs, AU --------------------------------------
  logic [AW-1:0]    waddr;
  logic             we1, we2, wlast, wbank, done_bank;
  logic             sum_valid;
  logic [SUM_W-1:0] sum;

  ijas_disu #(.N(N)) u_disu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .waddr     (waddr),
    .we1       (we1),
    .we2       (we2),
    .wlast     (wlast),
    .wbank     (wbank),
    .done_bank (done_bank)
  );

  ijas_au #(.N(N)) u_au (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .last      (wlast),
    .amp       (in_sample.amp),
    .sum_valid (sum_valid),
    .sum       (sum)
  );

  // ---- read controller ---------------------------------------------------
  logic            busy;
  logic [PW-1:0]   pass;
  logic [AW-1:0]   raddr;
  logic            bank;       // bank being read
  logic            next_bank;  // bank to process next
  logic            end_read;   // last read of the frame is issued now
  logic            start;
  logic [1:0]      ready;
  logic [SUM_W-1:0] sum1;

  assign end_read = busy && pass == PW'(NUM_ITER - 1) && raddr == AW'(N - 1);
  assign start    = ready[next_bank] && (!busy || end_read);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pass      <= '0;
      raddr     <= '0;
      bank      <= 1'b0;
      next_bank <= 1'b0;
    end else if (start) begin
      busy      <= 1'b1;
      pass      <= '0;
      raddr     <= '0;
      bank      <= next_bank;
      next_bank <= !next_bank;
    end else if (busy) begin
      if (end_read) begin
        busy <= 1'b0;
      end else if (raddr == AW'(N - 1)) begin
        raddr <= '0;
        pass  <= pass + 1'b1;
      end else begin
        raddr <= raddr + 1'b1;
      end
    end
  end

  // ---- RAMs ------------------------------------------------------------
  fsample_t ram1_rdata, ram2_rdata, rdata;

  sample_ram #(.DEPTH(N)) u_ram1 (
    .clk   (clk),
    .we    (we1),
    .waddr (waddr),
    .wdata (in_sample),
    .re    (busy && !bank),
    .raddr (raddr),
    .rdata (ram1_rdata)
  );

  sample_ram #(.DEPTH(N)) u_ram2 (
    .clk   (clk),
    .we    (we2),
    .waddr (waddr),
    .wdata (in_sample),
    .re    (busy && bank),
    .raddr (raddr),
    .rdata (ram2_rdata)
  );

  // ---- compare stage (one cycle after the read is issued) --------------
  logic          cv;
  logic [PW-1:0] cpass;
  logic [AW-1:0] caddr;
  logic          cbank;
  logic          cfinal;
  logic          clast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cv    <= 1'b0;
      cpass <= '0;
      caddr <= '0;
      cbank <= 1'b0;
    end else begin
      cv    <= busy;
      cpass <= pass;
      caddr <= raddr;
      cbank <= bank;
    end
  end

  assign cfinal = cpass == PW'(NUM_ITER - 1);
  assign clast  = caddr == AW'(N - 1);

  ijas_dpsu #(.N(N)) u_dpsu (
    .clk        (clk),
    .rst_n      (rst_n),
    .sum_valid  (sum_valid),
    .sum        (sum),
    .done_bank  (done_bank),
    .take       (start),
    .take_bank  (next_bank),
    .sel_bank   (bank),
    .sum1       (sum1),
    .ready      (ready),
    .rd_bank    (cbank),
    .ram1_rdata (ram1_rdata),
    .ram2_rdata (ram2_rdata),
    .rdata      (rdata),
    .overrun    (overrun)
  );

  // SUM_1/TH_1 are loaded while the frame's first read is issued, after the
  // previous frame's last comparison has used the old threshold.
  logic  load;
  logic  ge;
  logic  fr_bit;
  th_t   th_cur;
  cplx_t cu_out;

  assign load = busy && pass == '0 && raddr == '0;

  ijas_cu u_cu (
    .in_sample  (rdata),
    .th         (th_cur),
    .ge         (ge),
    .out_sample (cu_out)
  );

  ijas_fr #(.N(N)) u_fr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (load),
    .we    (cv && !cfinal),
    .waddr (caddr),
    .wbit  (ge),
    .raddr (caddr),
    .rbit  (fr_bit)
  );

  ijas_smu #(.N(N), .K(K)) u_smu (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .sum1      (sum1),
    .acc_en    (cv && !cfinal),
    .last      (clast),
    .ge        (ge),
    .fr        (fr_bit),
    .amp       (rdata.amp),
    .th_cur    (th_cur),
    .sum_cur   (),
    .th_update ()
  );

  // TH_1 of the frame in process, for status.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    th_first <= '0;
    else if (load) th_first <= th_t'(sum1 >> ($clog2(N) - $clog2(K)));
  end
  assign th_last = th_cur;

  // ---- output register ---------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
      clamped    <= 1'b0;
    end else begin
      out_valid <= cv && cfinal;
      clamped   <= cv && cfinal && ge;
      if (cv && cfinal) out_sample <= cu_out;
    end
  end

  // The passes must never let the input side refill a bank still in use.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !overrun)
    else $error("ijas_iterative: input rate exceeds f_s / NUM_ITER");

endmodule
