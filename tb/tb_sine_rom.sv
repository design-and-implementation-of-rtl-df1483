// tb_sine_rom: reads all 8192 words and compares each with
// round(127.5 + 127.5 * cos(2*pi*a/8192)) worked out with the simulator's
// own $cos (tolerance 1 LSB), checks the extremes 255 and 0 and that the
// output holds when en is low.
module tb_sine_rom;
  import bpsk_pkg::*;

  logic        clk = 1'b0;
  logic        en;
  logic [12:0] addr;
  logic [7:0]  q;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  sine_rom dut (.clk(clk), .en(en), .addr(addr), .q(q));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_word(input int a);
    real v;
    v = 127.5 + 127.5 * $cos(2.0 * 3.14159265358979 * a / 8192.0);
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    int d;
    logic [7:0] held;
    en = 1'b0; addr = '0;
    @(posedge clk);
    for (int a = 0; a < 8192; a++) begin
      #1 addr = 13'(a); en = 1'b1;
      @(posedge clk); #1;
      d = int'(q) - expect_word(a);
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        if (failures < 10) $display("addr %0d: q %0d expected %0d", a, q, expect_word(a));
      end
    end
    #1 addr = 13'd0; en = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'd255) begin failures++; $display("addr 0 gives %0d", q); end
    addr = 13'd4096;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'd0) begin failures++; $display("addr 4096 gives %0d", q); end
    held = q;
    en = 1'b0; addr = 13'd2048;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (q !== held) begin failures++; $display("q changed while en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
