// sine_rom: 8192 x 8 waveform ROM holding one period of the carrier.
//
// Each word is an offset-binary cosine sample, 0..255 (127.5 is the zero
// level), filled by an initial loop over bpsk_pkg::rom_word():
//   q = round(127.5 + 127.5 * cos(2*pi*addr/8192)).
// The ROM size, the 13-bit address and the positive 0..255 range follow the
// design description; the cosine phase (address 0 = peak) is chosen here so
// that the carrier matches cos(w*n/fs) of the demodulation equations.
//
// Read is synchronous like the FPGA block ROM it replaces: q takes the word
// at addr on the clock edge where en is high (one sample of latency).
module sine_rom
  import bpsk_pkg::*;
#(
  parameter int unsigned ADDR_W = ROM_AW,
  parameter int unsigned DATA_W = SMP_W
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] rom [1 << ADDR_W];

  initial begin
    for (int unsigned i = 0; i < (1 << ADDR_W); i++) rom[i] = rom_word(i);
  end

  initial begin : check_size
    assert (ADDR_W == ROM_AW && DATA_W == SMP_W)
      else $error("sine_rom: table is built for %0d x %0d", 1 << ROM_AW, SMP_W);
  end

  always_ff @(posedge clk) begin
    if (en) q <= rom[addr];
  end

endmodule
