// tb_data_gen: checks the data generator.  The accumulator must step by
// 104858 per strobe with ferq = 1 and by 52429 with ferq = 0 (compared with a
// reference every clock), hold between strobes, and its MSB must toggle
// every 80 samples (0.25 kHz at 40 kHz) or 160 samples (0.125 kHz).
module tb_data_gen;
  import bpsk_pkg::*;

  logic        clk = 1'b0;
  logic        rst, en, ferq;
  logic [23:0] data;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  data_gen dut (.clk(clk), .rst(rst), .en(en), .ferq(ferq), .data(data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned ref_acc;

  // Runs nsmp samples, 3 clocks apart; returns the sample counts between
  // MSB toggles through the half-period checks.
  task automatic run(input int nsmp, input int half);
    int last_t, n;
    logic prev;
    last_t = -1;
    prev = data[23];
    for (n = 1; n <= nsmp; n++) begin
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      ref_acc = (ref_acc + (ferq ? 104858 : 52429)) % (64'd1 << 24);
      checks++;
      if (data !== 24'(ref_acc)) begin
        failures++;
        $display("sample %0d: data %0d expected %0d", n, data, ref_acc);
      end
      if (data[23] != prev) begin
        if (last_t >= 0) begin
          checks++;
          if (n - last_t != half) begin
            failures++;
            $display("half period %0d samples, expected %0d", n - last_t, half);
          end
        end
        last_t = n;
        prev = data[23];
      end
      repeat (2) @(posedge clk); #1;
      checks++;
      if (data !== 24'(ref_acc)) begin
        failures++;
        $display("data changed without a strobe");
      end
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; ferq = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_acc = 0;
    checks++;
    if (data !== '0) begin failures++; $display("not cleared by reset"); end
    run(400, 80);
    ferq = 1'b0;
    ref_acc = data;   // the switch keeps the phase
    run(800, 160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
