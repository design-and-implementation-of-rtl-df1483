// tb_car_ddfs: runs the carrier DDFS at the 2 kHz code for 100 samples and
// compares every output with the cosine of a reference phase accumulator
// (one-sample ROM latency, 1 LSB tolerance); checks the 20-sample period and
// a second code (4 kHz, 10 samples per period).
module tb_car_ddfs;
  import bpsk_pkg::*;

  logic        clk = 1'b0;
  logic        rst, en;
  logic [23:0] code_f;
  logic [7:0]  carr;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  car_ddfs dut (.clk(clk), .rst(rst), .en(en), .code_f(code_f), .carr(carr));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cos_word(input longint unsigned ph);
    real v;
    v = 127.5 + 127.5 * $cos(2.0 * 3.14159265358979 * real'(ph >> 11) / 8192.0);
    return int'($floor(v + 0.5));
  endfunction

  longint unsigned ref_acc;
  int              hist[$];

  task automatic run(input int nsmp, input int period);
    int d;
    hist = {};
    for (int n = 0; n < nsmp; n++) begin
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      // carr now holds the word of the phase before this strobe
      d = int'(carr) - cos_word(ref_acc);
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("sample %0d: carr %0d expected %0d", n, carr, cos_word(ref_acc));
      end
      hist.push_back(int'(carr));
      ref_acc = (ref_acc + code_f) % (64'd1 << 24);
      repeat (3) @(posedge clk); #1;
    end
    // periodicity: each sample equals the one a period earlier (+-1)
    for (int n = period; n < nsmp; n++) begin
      checks++;
      d = hist[n] - hist[n - period];
      if (d > 1 || d < -1) begin
        failures++;
        $display("not periodic in %0d samples at %0d", period, n);
      end
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; code_f = CODE_CAR;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_acc = 0;
    run(100, 20);
    code_f = 24'd1677722;      // 4 kHz at 40 kHz
    run(60, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
