// tb_output_stage: random and corner filter outputs; x must be
// clamp(sout >>> 9, -128, 127) + 128 and bit_out its sign, taken only on
// valid.
module tb_output_stage;
  import bpsk_pkg::*;

  logic               clk = 1'b0;
  logic               rst, valid;
  logic signed [23:0] sout;
  logic [7:0]         x;
  logic               bit_out;
  int                 checks = 0, failures = 0;

  always #10 clk = ~clk;

  output_stage dut (.clk(clk), .rst(rst), .valid(valid), .sout(sout), .x(x), .bit_out(bit_out));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int v);
    int s;
    sout = 24'(v); valid = 1'b1;
    @(posedge clk); #1;
    valid = 1'b0;
    s = v >>> 9;
    if (s > 127) s = 127;
    if (s < -128) s = -128;
    checks++;
    if (int'(x) != s + 128 || bit_out != (s < 0)) begin
      failures++;
      $display("sout %0d: x %0d bit %0b expected %0d %0b", v, x, bit_out, s + 128, s < 0);
    end
    sout = 24'($urandom);
    @(posedge clk); #1;
    checks++;
    if (int'(x) != s + 128) begin failures++; $display("x changed without valid"); end
  endtask

  initial begin
    rst = 1'b1; valid = 1'b0; sout = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (x !== 8'd128 || bit_out !== 1'b0) begin failures++; $display("reset values"); end
    one(0); one(-1); one(511); one(512); one(-512); one(-513);
    one(40000); one(-40000); one(8388607); one(-8388608); one(65535); one(-65536);
    for (int i = 0; i < 2000; i++) one(int'($urandom_range(0, 200000)) - 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
