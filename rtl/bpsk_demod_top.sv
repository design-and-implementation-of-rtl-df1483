// bpsk_demod_top: digital BPSK modulator and coherent BPSK demodulator.
//
// Signal chain, everything on one 50 MHz clock:
//   sample_gen   24-bit accumulator, +13422 per clock -> sam (40 kHz) and a
//                one-cycle sample strobe that clocks all the blocks below
//   data_gen     square-wave data, 0.25 kHz (frq = 1) or 0.125 kHz (frq = 0)
//   bpsk_ddfs    2 kHz carrier DDFS whose phase is advanced by 180 degrees
//                while the data bit is 1 -> BPSK signal y
//   car_ddfs     2 kHz local carrier DDFS, same code and reset -> car
//   demodulator  (y - 128) * (car - 128), top 8 bits -> dem
//   fir_lpf      200-tap Hamming low-pass, fc = 2 kHz, removes the 4 kHz
//                term and leaves A*D(t)/2 * cos(phi0) -> k (24 bits)
//   output_stage scale to 8 bits, +128 -> x (DAC), sign -> bit_out
// The block structure, the frequency codes (13422, 838861, 104858, 52429,
// 8388608) and the widths follow the design description.  Both DDFS take the
// same code and reset, so the local carrier is phase-locked to the
// modulator (phi0 = 0).
//
// Choices of this design: the sample strobe as a clock enable instead of
// clocking blocks from the sampling square wave; the active-low reset_n is
// inverted into the internal asynchronous reset; `use_adc` lets an external
// converter's offset-binary samples (adc_sample, read on each strobe) replace
// the internal BPSK signal at the multiplier, as in the block diagram that
// starts with an ADC.
//
// Latency from a data transition to bit_out: about 100 samples (the FIR's
// 99.5-sample group delay plus 3 register stages), i.e. about 2.5 ms.
module bpsk_demod_top
  import bpsk_pkg::*;
(
  input  logic             clk,
  input  logic             reset_n,
  input  logic             frq,
  input  logic             use_adc,
  input  logic [SMP_W-1:0] adc_sample,
  output logic             sam,
  output logic             data_pulse,
  output logic [SMP_W-1:0] y,
  output logic [SMP_W-1:0] car,
  output logic [SMP_W-1:0] dem,
  output logic [23:0]      k,
  output logic [SMP_W-1:0] x,
  output logic             bit_out
);

  logic             rst;
  logic             en;
  logic [ACC_W-1:0] data;
  logic [SMP_W-1:0] demod_in;
  logic             lpf_valid;

  assign rst        = ~reset_n;
  assign data_pulse = data[ACC_W-1];
  assign demod_in   = use_adc ? adc_sample : y;

  sample_gen u_sample_gen (
    .clk (clk),
    .rst (rst),
    .sam (sam),
    .en  (en)
  );

  data_gen u_data_gen (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .ferq (frq),
    .data (data)
  );

  bpsk_ddfs u_bpsk_ddfs (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .code_f (CODE_CAR),
    .data   (data_pulse),
    .bpsk   (y)
  );

  car_ddfs u_car_ddfs (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .code_f (CODE_CAR),
    .carr   (car)
  );

  demodulator u_demodulator (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .bpsk_sig (demod_in),
    .car_sig  (car),
    .out_dem  (dem)
  );

  fir_lpf u_lpf (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .din   (dem),
    .sout  (k),
    .valid (lpf_valid)
  );

  output_stage u_output_stage (
    .clk     (clk),
    .rst     (rst),
    .valid   (lpf_valid),
    .sout    (k),
    .x       (x),
    .bit_out (bit_out)
  );

endmodule
