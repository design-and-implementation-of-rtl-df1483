// car_ddfs: carrier direct digital frequency synthesiser.
//
// A 24-bit phase accumulator adds code_f once per sample (en); its top 13
// bits address the 8192 x 8 cosine ROM, whose registered output is the
// offset-binary carrier `carr` (0..255).  Output frequency is
// f = code_f * f_sam / 2^24, so code 838861 gives 2 kHz at 40 kHz sampling
// (20 samples per period).  Structure, widths and the address slice [23:11]
// follow the design description; the clock enable is this design's choice.
//
// Timing: carr shows the phase the accumulator held before the same en edge
// (the accumulator and the ROM register update together).  rst clears the
// accumulator asynchronously.
module car_ddfs
  import bpsk_pkg::*;
#(
  parameter int unsigned W = ACC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [W-1:0]     code_f,
  output logic [SMP_W-1:0] carr
);

  logic [W-1:0] acc;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc + code_f;
  end

  sine_rom u_rom (
    .clk  (clk),
    .en   (en),
    .addr (acc[W-1 -: ROM_AW]),
    .q    (carr)
  );

endmodule
