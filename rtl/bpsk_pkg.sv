// bpsk_pkg: constants and table-building functions shared by the
// BPSK modulator/demodulator.
//
// The design runs from one 50 MHz clock.  All signal processing advances on
// a 40 kHz sample strobe, so every frequency code below is a 24-bit phase
// increment per clock (sampling accumulator) or per sample (everything else):
//   code = f * 2^24 / f_ref
// with f_ref = 50 MHz for the sampling accumulator and 40 kHz for the rest.
//
// The two lookup tables (the 8192x8 waveform ROM and the 200 FIR
// coefficients) are computed here with plain real
// arithmetic, so no data file is needed:
//   ROM[i]  = round(127.5 + 127.5 * cos(2*pi*i/8192))            (0..255)
//   h[n]    = 2fc/fs * sinc(2fc/fs * (n - (N-1)/2)) * w[n],  w = Hamming
//             normalised to unity DC gain, then scaled so the largest tap
//             is 127 and rounded to 8-bit signed.
// sin/cos are evaluated with a range-reduced Taylor series so that the
// functions stay constant-evaluable in every tool.
package bpsk_pkg;

  localparam int unsigned ACC_W = 24;           // phase accumulator width
  localparam int unsigned SMP_W = 8;            // sample width
  localparam int unsigned ROM_AW = 13;          // 8192-entry ROM

  // Frequency codes (24-bit phase increments)
  localparam logic [ACC_W-1:0] CODE_SAM  = 24'd13422;   // 40 kHz at 50 MHz
  localparam logic [ACC_W-1:0] CODE_CAR  = 24'd838861;  // 2 kHz at 40 kHz
  localparam logic [ACC_W-1:0] CODE_MOD1 = 24'd104858;  // 0.25 kHz at 40 kHz
  localparam logic [ACC_W-1:0] CODE_MOD2 = 24'd52429;   // 0.125 kHz at 40 kHz
  localparam logic [ACC_W-1:0] PHASE_PI  = 24'd8388608; // 180 degrees

  // FIR low-pass: order 199, fc = 2 kHz, fs = 40 kHz, Hamming window
  localparam int unsigned FIR_TAPS = 200;
  localparam real FIR_WC = 2000.0 / 20000.0;     // fc / (fs/2)

  localparam real PI = 3.14159265358979323846;

  // sin(x) for any real x: reduce to [-pi, pi], then Taylor series.
  function automatic real sin_r(input real x);
    real r, term, sum;
    int k;
    r = x - 2.0 * PI * $floor((x + PI) / (2.0 * PI));
    term = r;
    sum = r;
    for (k = 1; k < 10; k++) begin   // error < 1e-7 on [-pi, pi]
      term = -term * r * r / ((2.0 * k) * (2.0 * k + 1.0));
      sum = sum + term;
    end
    return sum;
  endfunction

  function automatic real cos_r(input real x);
    return sin_r(x + PI / 2.0);
  endfunction

  // One ROM word: offset-binary cosine sample, 0..255.
  function automatic logic [SMP_W-1:0] rom_word(input int unsigned i);
    real v;
    v = 127.5 + 127.5 * cos_r(2.0 * PI * real'(i) / real'(1 << ROM_AW));
    return SMP_W'($rtoi($floor(v + 0.5)));
  endfunction

  // Windowed-sinc prototype tap (real, before normalisation).
  function automatic real fir_proto(input int n, input int taps);
    real t, s, w;
    t = real'(n) - real'(taps - 1) / 2.0;
    if (t == 0.0) s = FIR_WC;
    else          s = sin_r(PI * FIR_WC * t) / (PI * t);
    w = 0.54 - 0.46 * cos_r(2.0 * PI * real'(n) / real'(taps - 1));
    return s * w;
  endfunction

  // Quantised tap n of a taps-long filter.  The largest prototype tap of a
  // windowed-sinc low-pass is the centre one; it maps to 127.
  function automatic logic signed [7:0] fir_coef(input int n, input int taps);
    real v;
    v = fir_proto(n, taps) * 127.0 / fir_proto(taps / 2, taps);
    return 8'($rtoi($floor(v + 0.5)));
  endfunction

endpackage
