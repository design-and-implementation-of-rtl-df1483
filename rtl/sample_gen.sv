// sample_gen: sampling-signal generator.
//
// A 24-bit phase accumulator adds CODE_SAM = 13422 on every 50 MHz clock, so
// its MSB (sam) is a square wave of 50e6 * 13422 / 2^24 = 40.0004 kHz, the
// sampling frequency of the whole design.  This accumulator structure and the
// constant follow the design description.  In addition (this design's own
// choice) the module turns each rising edge of the MSB into a one-cycle
// strobe `en`, which all sample-rate logic uses as a clock enable, so the
// design stays on a single clock.  The strobe is registered and high in the
// clock cycle right after the MSB has risen; strobes are 1249 or 1250 clocks
// apart.
//
// rst clears the accumulator asynchronously (the accumulator's aclr).
module sample_gen
  import bpsk_pkg::*;
#(
  parameter int unsigned        W    = ACC_W,
  parameter logic [ACC_W-1:0]   CODE = CODE_SAM
) (
  input  logic clk,
  input  logic rst,
  output logic sam,
  output logic en
);

  logic [W-1:0] acc;
  logic [W-1:0] acc_next;

  assign acc_next = acc + W'(CODE);
  assign sam      = acc[W-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc <= '0;
      en  <= 1'b0;
    end else begin
      acc <= acc_next;
      en  <= acc_next[W-1] & ~acc[W-1];
    end
  end

endmodule
