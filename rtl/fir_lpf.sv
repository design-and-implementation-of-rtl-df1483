// fir_lpf: direct-form FIR low-pass filter of the demodulated product.
//
// Specification (from the design description): order 199 (200 taps),
// window method with a Hamming window, cut-off 2 kHz at 40 kHz sampling,
// passband scaled, 8-bit coefficients, 8-bit input, 24-bit output.  The taps
// are computed at elaboration time by bpsk_pkg::fir_coef (windowed sinc, the
// largest tap quantised to 127; DC gain sum(h) = 1286).
//
// Architecture (this design's choice): the sum y[n] = sum_k h[k] x[n-k] is
// evaluated by one multiply-accumulate unit over TAPS clock cycles per
// sample.  New samples go into a circular TAPS-word buffer; on each sample
// strobe `en` the sample is written and the MAC walks from the newest sample
// back to the oldest.  A sample period is about 1250 clocks, so the 200-cycle
// pass always finishes before the next strobe (asserted).
//
// Timing: sout is registered and `valid` pulses for one cycle TAPS + 1
// clocks after the en cycle that wrote din.  rst clears the sample buffer,
// the accumulator and the output.
module fir_lpf
  import bpsk_pkg::*;
#(
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned DIN_W  = SMP_W,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned DOUT_W = 24
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [DIN_W-1:0]  din,
  output logic signed [DOUT_W-1:0] sout,
  output logic                     valid
);

  localparam int unsigned IW = $clog2(TAPS);

  logic signed [COEF_W-1:0] coef [TAPS];
  for (genvar n = 0; n < TAPS; n++) begin : g_coef
    assign coef[n] = COEF_W'(fir_coef(n, TAPS));
  end

  logic signed [DIN_W-1:0]  xbuf [TAPS];
  logic [IW-1:0]            head;     // index of the newest sample
  logic [IW-1:0]            rp;       // sample read pointer during the pass
  logic [IW-1:0]            k;        // tap index during the pass
  logic                     busy;
  logic signed [DOUT_W-1:0] acc;
  logic signed [DOUT_W-1:0] term;
  logic [IW-1:0]            head_next;

  assign head_next = (head == IW'(TAPS - 1)) ? '0 : head + 1'b1;
  assign term      = DOUT_W'(coef[k] * xbuf[rp]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) xbuf[i] <= '0;
      head  <= '0;
      rp    <= '0;
      k     <= '0;
      busy  <= 1'b0;
      acc   <= '0;
      sout  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        xbuf[head_next] <= din;
        head <= head_next;
        rp   <= head_next;
        k    <= '0;
        acc  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        rp <= (rp == '0) ? IW'(TAPS - 1) : rp - 1'b1;
        k  <= k + 1'b1;
        if (k == IW'(TAPS - 1)) begin
          sout  <= acc + term;
          valid <= 1'b1;
          busy  <= 1'b0;
        end else begin
          acc <= acc + term;
        end
      end
    end
  end

  // A new sample must not arrive while a pass is still running (busy is
  // clear during reset, so the rule needs no reset qualifier).
  assert property (@(posedge clk) en |-> !busy)
    else $error("fir_lpf: sample strobe during a MAC pass");

endmodule
