// output_stage: scale, offset and decision after the low-pass filter.
//
// Three steps follow the filter in the design description: a scaler, an
// adder that adds 128 to give an offset-binary 8-bit output for a DAC, and a
// comparator with threshold 0 that gives the recovered bit.  The scaler here
// (this design's choice) is an arithmetic right shift by SHIFT with
// saturation to 8-bit signed; with the default filter and modulator levels a
// steady bit reaches about +-79.  The decision is taken on the sign of the
// scaled value: bit_out = 1 for a negative value, which is the 180-degree
// phase the modulator sends for data = 1, so bit_out reproduces the
// transmitted data.
//
// Timing: x and bit_out are registered on the cycle `valid` is high.
// rst clears them (x to 128, the zero level).
module output_stage
  import bpsk_pkg::*;
#(
  parameter int unsigned IN_W  = 24,
  parameter int unsigned OUT_W = SMP_W,
  parameter int unsigned SHIFT = 9
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   valid,
  input  logic signed [IN_W-1:0] sout,
  output logic [OUT_W-1:0]       x,
  output logic                   bit_out
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 << (OUT_W - 1));

  logic signed [IN_W-1:0]  shifted;
  logic signed [OUT_W-1:0] scaled;

  assign shifted = sout >>> SHIFT;

  always_comb begin
    if (shifted > MAXV)      scaled = MAXV[OUT_W-1:0];
    else if (shifted < MINV) scaled = MINV[OUT_W-1:0];
    else                     scaled = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      x       <= OUT_W'(1 << (OUT_W - 1));
      bit_out <= 1'b0;
    end else if (valid) begin
      x       <= OUT_W'(scaled) + OUT_W'(1 << (OUT_W - 1));
      bit_out <= scaled[OUT_W-1];
    end
  end

endmodule
