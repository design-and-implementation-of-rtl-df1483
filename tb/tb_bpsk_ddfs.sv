// tb_bpsk_ddfs: drives the BPSK DDFS with the 2 kHz code and a random data
// bit per sample and compares each output with
// round(127.5 + 127.5 * cos(2*pi*((acc + data*2^23) >> 11)/8192)) of a
// reference accumulator (1 LSB tolerance).  Also checks that the output for
// data = 1 mirrors the one for data = 0 around 127.5.
module tb_bpsk_ddfs;
  import bpsk_pkg::*;

  logic        clk = 1'b0;
  logic        rst, en, data;
  logic [23:0] code_f;
  logic [7:0]  bpsk;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  bpsk_ddfs dut (.clk(clk), .rst(rst), .en(en), .code_f(code_f), .data(data), .bpsk(bpsk));

  initial begin
    repeat (20000) @(posedge clk);
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

  longint unsigned ref_acc;
  int              n_flip = 0;

  initial begin
    int d, e;
    rst = 1'b1; en = 1'b0; data = 1'b0; code_f = CODE_CAR;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_acc = 0;
    for (int n = 0; n < 300; n++) begin
      data = 1'($urandom);
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      e = cos_word(ref_acc + (data ? 64'd8388608 : 64'd0));
      d = int'(bpsk) - e;
      checks++;
      if (d > 1 || d < -1) begin
        failures++;
        $display("sample %0d data %0b: bpsk %0d expected %0d", n, data, bpsk, e);
      end
      if (data) begin
        // mirrored: bpsk + carrier word = 255 (+-1)
        checks++;
        d = int'(bpsk) + cos_word(ref_acc) - 255;
        if (d > 1 || d < -1) begin failures++; $display("not inverted at %0d", n); end
        n_flip++;
      end
      ref_acc = (ref_acc + code_f) % (64'd1 << 24);
      repeat (2) @(posedge clk); #1;
    end
    checks++;
    if (n_flip == 0) begin failures++; $display("no data = 1 sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
