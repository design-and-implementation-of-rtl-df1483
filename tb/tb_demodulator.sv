// tb_demodulator: random and corner offset-binary inputs; the output must be
// ((bpsk - 128) * (car - 128)) >>> 8 one strobe later and hold without a
// strobe.
module tb_demodulator;
  import bpsk_pkg::*;

  logic              clk = 1'b0;
  logic              rst, en;
  logic [7:0]        bpsk_sig, car_sig;
  logic signed [7:0] out_dem;
  int                checks = 0, failures = 0;

  always #10 clk = ~clk;

  demodulator dut (.clk(clk), .rst(rst), .en(en), .bpsk_sig(bpsk_sig),
                   .car_sig(car_sig), .out_dem(out_dem));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b);
    int e;
    bpsk_sig = 8'(a); car_sig = 8'(b); en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    e = ((a - 128) * (b - 128)) >>> 8;
    checks++;
    if (int'(out_dem) != e) begin
      failures++;
      $display("%0d x %0d: out %0d expected %0d", a, b, out_dem, e);
    end
    bpsk_sig = 8'($urandom); car_sig = 8'($urandom);
    @(posedge clk); #1;
    checks++;
    if (int'(out_dem) != e) begin failures++; $display("output changed without a strobe"); end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; bpsk_sig = '0; car_sig = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    one(255, 255); one(0, 0); one(255, 0); one(0, 255); one(128, 77); one(200, 60);
    for (int i = 0; i < 2000; i++) one(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
