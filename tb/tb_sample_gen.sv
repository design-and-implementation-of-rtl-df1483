// tb_sample_gen: checks the 40 kHz sampling generator against a reference
// accumulator kept in the testbench: sam must equal the reference MSB on
// every clock, the strobe must follow each MSB rising edge by one clock, the
// strobe spacing must be 1249 or 1250 clocks, and 10 strobes must take
// 10 * 2^24 / 13422 clocks (+-1), i.e. 40 kHz at 50 MHz.
module tb_sample_gen;
  import bpsk_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic sam, en;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  sample_gen dut (.clk(clk), .rst(rst), .sam(sam), .en(en));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned ref_acc;
  logic            ref_prev_msb;
  int              cyc, last_en, n_en, first_en;

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ref_acc = 0; ref_prev_msb = 0; cyc = 0; last_en = -1; n_en = 0; first_en = -1;
    while (n_en < 21) begin
      @(posedge clk);
      #1;
      ref_prev_msb = ref_acc[23];
      ref_acc = (ref_acc + 13422) % (64'd1 << 24);
      cyc++;
      checks++;
      if (sam !== ref_acc[23]) begin
        failures++;
        $display("cycle %0d: sam %0b expected %0b", cyc, sam, ref_acc[23]);
      end
      checks++;
      if (en !== (ref_acc[23] & ~ref_prev_msb)) begin
        failures++;
        $display("cycle %0d: en %0b expected %0b", cyc, en, ref_acc[23] & ~ref_prev_msb);
      end
      if (en) begin
        if (last_en >= 0) begin
          checks++;
          if (cyc - last_en != 1249 && cyc - last_en != 1250) begin
            failures++;
            $display("strobe spacing %0d", cyc - last_en);
          end
        end
        if (n_en == 10) first_en = cyc;
        last_en = cyc;
        n_en++;
      end
    end
    // 10 strobe periods: 10 * 2^24 / 13422 = 12499.6 clocks
    checks++;
    if (last_en - first_en < 12498 || last_en - first_en > 12501) begin
      failures++;
      $display("10 sample periods took %0d clocks", last_en - first_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
