// data_gen: square-pulse data generator.
//
// A 24-bit accumulator advances once per sample (en) by one of two frequency
// codes picked by `ferq`: CODE_MOD1 = 104858 (0.25 kHz at 40 kHz) when ferq
// is 1, CODE_MOD2 = 52429 (0.125 kHz) when ferq is 0.  Its MSB data[23] is
// the square-wave modulating signal; the whole accumulator value is output
// as in the design description.  The codes, the two-way multiplexer and the
// accumulator are the described structure; the clock enable is this design's
// way of running the accumulator at the sample rate from the 50 MHz clock.
//
// With CODE_MOD1 the MSB toggles every 80 samples (period 160 samples).
// rst clears the accumulator asynchronously.
module data_gen
  import bpsk_pkg::*;
#(
  parameter int unsigned      W     = ACC_W,
  parameter logic [ACC_W-1:0] CODE1 = CODE_MOD1,
  parameter logic [ACC_W-1:0] CODE2 = CODE_MOD2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         ferq,
  output logic [W-1:0] data
);

  logic [W-1:0] step;

  assign step = ferq ? W'(CODE1) : W'(CODE2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     data <= '0;
    else if (en) data <= data + step;
  end

endmodule
