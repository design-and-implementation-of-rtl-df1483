// tb_fir_lpf: checks the 200-tap low-pass filter against a reference
// convolution whose taps the testbench designs itself (Hamming-windowed
// sinc, fc = 2 kHz, fs = 40 kHz, largest tap 127, $sin/$cos).  Random input,
// an impulse (the output must replay the taps) and a DC step (gain = sum of
// taps) are used; valid must come TAPS + 1 clocks after each strobe.
module tb_fir_lpf;
  import bpsk_pkg::*;

  localparam int TAPS = 200;
  localparam int GAP  = 260;   // clocks between strobes

  logic               clk = 1'b0;
  logic               rst, en;
  logic signed [7:0]  din;
  logic signed [23:0] sout;
  logic               valid;
  int                 checks = 0, failures = 0;

  always #10 clk = ~clk;

  fir_lpf dut (.clk(clk), .rst(rst), .en(en), .din(din), .sout(sout), .valid(valid));

  initial begin
    repeat (1000 * GAP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h[TAPS];
  int xs[$];

  function automatic real proto(input int n);
    real t, s, w, pi;
    pi = 3.14159265358979;
    t = n - (TAPS - 1) / 2.0;
    s = (t == 0.0) ? 0.1 : $sin(pi * 0.1 * t) / (pi * t);
    w = 0.54 - 0.46 * $cos(2.0 * pi * n / (TAPS - 1));
    return s * w;
  endfunction

  task automatic push(input int v);
    int e, lat;
    xs.push_front(v);
    din = 8'(v); en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    lat = 0;
    while (!valid && lat < GAP - 10) begin
      @(posedge clk); #1;
      lat++;
    end
    checks++;
    if (lat != TAPS) begin
      failures++;
      $display("valid %0d clocks after the strobe cycle, expected %0d", lat + 1, TAPS + 1);
    end
    e = 0;
    for (int k = 0; k < TAPS && k < xs.size(); k++) e += h[k] * xs[k];
    checks++;
    if (int'(sout) != e) begin
      failures++;
      if (failures < 10) $display("sample %0d: sout %0d expected %0d", xs.size(), sout, e);
    end
    repeat (GAP - lat - 2) @(posedge clk);
    #1;
  endtask

  initial begin
    int sum;
    real mx;
    mx = proto(TAPS / 2);
    sum = 0;
    for (int n = 0; n < TAPS; n++) begin
      h[n] = int'($floor(proto(n) * 127.0 / mx + 0.5));
      sum += h[n];
    end
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // impulse: the output replays the taps
    push(1);
    for (int n = 1; n < TAPS; n++) push(0);
    // random input
    for (int n = 0; n < 250; n++) push(int'($urandom_range(0, 255)) - 128);
    // full-scale negative step: the output settles to -128 * sum(h)
    for (int n = 0; n < TAPS; n++) push(-128);
    checks++;
    if (int'(sout) != -128 * sum) begin
      failures++;
      $display("DC gain: %0d expected %0d", sout, -128 * sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
