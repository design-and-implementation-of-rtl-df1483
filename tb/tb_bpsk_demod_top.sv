// tb_bpsk_demod_top: end-to-end test of the modulator/demodulator at its
// real rates (50 MHz clock, 40 kHz samples, default parameters).
//
// Phases: reset; frq = 1 (0.25 kHz data) for 560 samples; frq = 0
// (0.125 kHz) for 720 samples; then use_adc = 1 with the testbench acting as
// the converter, sending a BPSK signal of its own (a 1 ms-per-bit pattern on
// the local carrier) for 480 samples with phi0 = 0, then 480 samples with a
// 60-degree phase error, where the output level must halve (cos 60 = 1/2,
// the cos(phi0) factor of the demodulated signal); then a second reset.
// On every sample strobe it checks:
//   - y against an independent BPSK model (reference accumulator, $cos);
//   - the data generator half period (80 or 160 samples);
//   - bit_out against the data sent about 100 samples earlier (the filter's
//     group delay), skipping samples near a data transition;
//   - x on the right side of 128 for steady bits.
// Mechanisms counted (each must occur): phase reversals in y, a frq switch,
// both data rates, ADC input, a phase error, both decisions, reset.
module tb_bpsk_demod_top;
  import bpsk_pkg::*;

  logic        clk = 1'b0;
  logic        reset_n, frq, use_adc;
  logic [7:0]  adc_sample;
  logic        sam, data_pulse, bit_out;
  logic [7:0]  y, car, dem, x;
  logic [23:0] k;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  bpsk_demod_top dut (
    .clk(clk), .reset_n(reset_n), .frq(frq), .use_adc(use_adc), .adc_sample(adc_sample),
    .sam(sam), .data_pulse(data_pulse), .y(y), .car(car), .dem(dem), .k(k), .x(x),
    .bit_out(bit_out)
  );

  localparam int N_FAST = 560, N_SLOW = 720, N_ADC = 480;
  localparam int DELAY  = 102;   // samples from data to decision
  localparam int GUARD  = 14;    // skip this close to a transition

  initial begin
    repeat ((N_FAST + N_SLOW + 2 * N_ADC + 50) * 1251) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cos_word(input longint unsigned ph);
    real v;
    v = 127.5 + 127.5 * $cos(2.0 * 3.14159265358979 * real'((ph % (64'd1 << 24)) >> 11) / 8192.0);
    return int'($floor(v + 0.5));
  endfunction

  // mechanism counters
  int n_reversal = 0, n_frq_switch = 0, n_half_fast = 0, n_half_slow = 0;
  int n_phi = 0, n_adc = 0, n_dec1 = 0, n_dec0 = 0, n_reset = 0, n_cmp = 0;

  // output level (|x - 128|) per test phase: 0 = phi0 0, 1 = phi0 60 deg
  int  lvl_sel = 0, lvl_start = 0;
  real lvl_sum[2] = '{0.0, 0.0};
  int  lvl_cnt[2] = '{0, 0};

  // per-sample history of the bit being sent
  int  sent[$];
  int  smp = 0;

  // Reference state of the modulator: phase accumulator (shared by both
  // DDFS, which have the same code and reset) and data accumulator.
  longint unsigned ref_acc = 0, ref_data = 0;

  // The sample strobe is the clock edge right after sam rises; return just
  // after that edge.
  task automatic next_sample();
    @(posedge sam);
    @(posedge clk); #1;
    smp++;
  endtask

  function automatic bit near_transition(input int idx);
    for (int j = idx - GUARD; j <= idx + GUARD; j++)
      if (j >= 1 && j < sent.size() && sent[j] != sent[j - 1]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_decision();
    int idx;
    idx = sent.size() - 1 - DELAY;
    if (idx < GUARD + 1 || near_transition(idx)) return;
    checks++; n_cmp++;
    if (int'(bit_out) != sent[idx]) begin
      failures++;
      if (failures < 20) $display("sample %0d: bit_out %0b, sent %0d", smp, bit_out, sent[idx]);
    end
    checks++;
    if ((sent[idx] == 0 && x < 8'd150) || (sent[idx] == 1 && x > 8'd106)) begin
      failures++;
      if (failures < 20) $display("sample %0d: x %0d too close to 128 for bit %0d", smp, x, sent[idx]);
    end
    if (bit_out) n_dec1++; else n_dec0++;
    // mean distance of x from the zero level 128, per test phase
    if (idx >= lvl_start + 100) begin   // the filter window lies in this phase
      lvl_sum[lvl_sel] += (x > 8'd128) ? real'(x - 8'd128) : real'(8'd128 - x);
      lvl_cnt[lvl_sel]++;
    end
  endtask

  task automatic do_reset();
    reset_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (k !== '0 || x !== 8'd128 || data_pulse !== 1'b0) begin
      failures++;
      $display("reset did not clear k/x/data");
    end
    reset_n = 1'b1;
    ref_acc = 0;
    ref_data = 0;
    n_reset++;
  endtask

  // Internal modulator: data generator + BPSK DDFS model.
  task automatic run_internal(input int nsmp, input int half);
    int e, d, last_t;
    logic prev_data;
    last_t = -1;
    prev_data = ref_data[23];
    for (int n = 0; n < nsmp; n++) begin
      // the strobe edge loads y from the phase and data held before it
      e = cos_word(ref_acc + (ref_data[23] ? 64'd8388608 : 64'd0));
      next_sample();
      d = int'(y) - e;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        if (failures < 20) $display("sample %0d: y %0d expected %0d", smp, y, e);
      end
      sent.push_back(int'(ref_data[23]));
      if (ref_data[23] != prev_data) begin
        n_reversal++;
        if (last_t >= 0) begin
          checks++;
          if (n - last_t != half) begin
            failures++;
            $display("data half period %0d, expected %0d", n - last_t, half);
          end else if (half == 80) n_half_fast++;
          else n_half_slow++;
        end
        last_t = n;
        prev_data = ref_data[23];
      end
      ref_acc  = (ref_acc + CODE_CAR) % (64'd1 << 24);
      ref_data = (ref_data + (frq ? CODE_MOD1 : CODE_MOD2)) % (64'd1 << 24);
      // the data generator has stepped on the same strobe
      checks++;
      if (data_pulse !== ref_data[23]) begin
        failures++;
        if (failures < 20) $display("sample %0d: data_pulse %0b expected %0b", smp, data_pulse, ref_data[23]);
      end
      check_decision();
    end
  endtask

  // External converter: the testbench sends its own BPSK signal, bits of
  // 40 samples (1 ms) from a fixed pattern, phase-locked to the carrier.
  task automatic run_adc(input int nsmp, input longint unsigned phi0);
    longint unsigned ph;
    int b;
    logic [15:0] pattern = 16'b0011_0101_1100_1001;
    for (int n = 0; n < nsmp; n++) begin
      // between strobes the carrier register holds the word of the phase one
      // step behind the accumulator; the multiplier pairs the sample with it
      ph = ((64'd1 << 24) + ref_acc - CODE_CAR) % (64'd1 << 24);
      // one sample sent per strobe; the demodulator reads it on the strobe
      // together with the carrier word of phase ph
      b = int'(pattern[(n / 40) % 16]);
      adc_sample = 8'(cos_word(ph + phi0 + (b ? 64'd8388608 : 64'd0)));
      next_sample();
      sent.push_back(b);
      n_adc++;
      ref_acc  = (ref_acc + CODE_CAR) % (64'd1 << 24);
      ref_data = (ref_data + (frq ? CODE_MOD1 : CODE_MOD2)) % (64'd1 << 24);
      check_decision();
    end
  endtask

  initial begin
    reset_n = 1'b0; frq = 1'b1; use_adc = 1'b0; adc_sample = 8'd128;
    repeat (5) @(posedge clk);
    do_reset();
    run_internal(N_FAST, 80);
    frq = 1'b0; n_frq_switch++;
    run_internal(N_SLOW, 160);
    use_adc = 1'b1;
    sent = {};
    lvl_sel = 0; lvl_start = 0;
    run_adc(N_ADC, 0);
    // phase error of 60 degrees: the output must drop to cos(60) = 1/2
    lvl_sel = 1; lvl_start = sent.size();
    run_adc(N_ADC, 64'd2796203);
    n_phi++;
    use_adc = 1'b0;
    do_reset();
    repeat (3000) @(posedge clk);
    $display("reversals %0d, frq switches %0d, fast halves %0d, slow halves %0d, adc samples %0d",
             n_reversal, n_frq_switch, n_half_fast, n_half_slow, n_adc);
    $display("decisions compared %0d (ones %0d, zeros %0d), resets %0d",
             n_cmp, n_dec1, n_dec0, n_reset);
    if (n_reversal == 0)   begin failures++; $display("no phase reversal"); end
    if (n_frq_switch == 0) begin failures++; $display("no frq switch"); end
    if (n_half_fast == 0)  begin failures++; $display("0.25 kHz data never seen"); end
    if (n_half_slow == 0)  begin failures++; $display("0.125 kHz data never seen"); end
    if (n_adc == 0)        begin failures++; $display("ADC path never used"); end
    if (n_dec1 == 0 || n_dec0 == 0) begin failures++; $display("a decision value never seen"); end
    if (lvl_cnt[0] == 0 || lvl_cnt[1] == 0) begin
      failures++; $display("no settled output level with phi0 = 0 or 60 degrees");
    end else begin
      real r;
      r = (lvl_sum[1] / lvl_cnt[1]) / (lvl_sum[0] / lvl_cnt[0]);
      $display("output level phi0=0: %0.1f, phi0=60: %0.1f, ratio %0.3f",
               lvl_sum[0] / lvl_cnt[0], lvl_sum[1] / lvl_cnt[1], r);
      checks++;
      if (r < 0.44 || r > 0.56) begin failures++; $display("cos(phi0) scaling off"); end
    end
    if (n_phi == 0)        begin failures++; $display("no phase-offset run"); end
    if (n_reset < 2)       begin failures++; $display("second reset missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
