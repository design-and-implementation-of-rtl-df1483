// bpsk_ddfs: BPSK modulator built as a direct digital frequency synthesiser.
//
// A 24-bit phase accumulator adds code_f once per sample (en).  A multiplexer
// driven by the data bit adds either 0 or 8388608 (half of 2^24, i.e. 180
// degrees) to the accumulated phase, and bits [23:11] of that sum address the
// 8192 x 8 cosine ROM.  The registered ROM output `bpsk` is the offset-binary
// BPSK signal: the carrier when data = 0, the inverted carrier when data = 1.
// This structure and its constants follow the design description; the
// clock enable is this design's choice.
//
// Timing: bpsk shows the phase (and data bit) present before the en edge,
// so with the same code and reset it lines up sample for sample with
// car_ddfs.  rst clears the accumulator asynchronously.
module bpsk_ddfs
  import bpsk_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [W-1:0]     code_f,
  input  logic             data,
  output logic [SMP_W-1:0] bpsk
);

  logic [W-1:0] acc;
  logic [W-1:0] offset;
  logic [W-1:0] phase;

  assign offset = data ? W'(PHASE_PI) : '0;
  assign phase  = acc + offset;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc + code_f;
  end

  sine_rom u_rom (
    .clk  (clk),
    .en   (en),
    .addr (phase[W-1 -: ROM_AW]),
    .q    (bpsk)
  );

endmodule
