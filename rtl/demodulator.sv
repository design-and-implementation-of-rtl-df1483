// demodulator: coherent product of the BPSK signal and the local carrier.
//
// Both inputs are offset-binary samples (0..255).  Subtracting 128 turns each
// into a two's-complement value; the two are multiplied as signed 8 x 8
// numbers and the 8 most significant bits of the 16-bit product form the
// registered signed output out_dem.  Subtract-128 stages and a signed
// multiplier with an 8-bit result follow the design description; keeping the
// top 8 product bits (product >>> 8) is this design's reading of an 8-bit
// multiplier result.  With full-scale inputs out_dem spans -64..+64, mean
// +-31.5 for an in-phase/anti-phase carrier.
//
// Timing: out_dem updates on the clock edge where en is high (one sample of
// latency).  rst clears it asynchronously.
module demodulator
  import bpsk_pkg::*;
#(
  parameter int unsigned W = SMP_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [W-1:0]        bpsk_sig,
  input  logic [W-1:0]        car_sig,
  output logic signed [W-1:0] out_dem
);

  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] prod;

  assign a    = signed'(bpsk_sig - W'(1 << (W - 1)));
  assign b    = signed'(car_sig  - W'(1 << (W - 1)));
  assign prod = a * b;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     out_dem <= '0;
    else if (en) out_dem <= prod[2*W-1 -: W];
  end

endmodule
