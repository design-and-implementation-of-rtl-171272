// Coherent BFSK modem: on-chip BFSK transmitter plus two-channel coherent
// demodulator, all on one 50 MHz clock.
//
// A sampling accumulator (13422 per clock) makes the 40 kHz sample strobe
// that paces everything else.  The data generator produces a 100 Hz square
// data bit; the carrier DDFS produces a 1.2 kHz (bit 0) and a 2.1 kHz
// (bit 1) cosine; the BFSK DDFS picks one of them with the data bit.  The
// same two carriers are the receiver's local oscillators, so the
// demodulator is coherent by construction.  Each channel multiplies the
// BFSK sample by its carrier (X1, X2), low-pass filters the product with a
// 251-tap FIR (LPF-1, LPF-2) to keep the A/2 term of the matching tone,
// and offsets an 8-bit slice of the result into DAC code (Scale-1/2).  The
// decision output z is 1 when channel 1 exceeds channel 0.
//
// ext_sel = 1 replaces the internal BFSK samples by ext_bfsk, the
// offset-binary samples of an external ADC; ext_bfsk is sampled as is,
// once per sample strobe, so it must be synchronous to clk.  reset_n is an
// active-low push button, inverted to the active-high clear used inside.
//
// Timing: after a data edge the demodulated outputs follow with the group
// delay of the filters, 125 samples (3.125 ms), plus a few samples of
// pipeline; z moves midway through the filter's ramp, so it lags data_bit
// by about 125 samples.  dat is the data bit as a full-scale DAC code
// (255 or 0) for display next to the filter outputs.
//
// Block structure, frequency words, widths and filter specification
// follow the published design; the single-clock strobe scheme, the
// external-sample select, and the scale slice are this design's choices.
module bfsk_demod_top
  import bfsk_pkg::*;
#(
  parameter int unsigned ACC_W_P   = ACC_W,
  parameter int unsigned ROM_AW_P  = ROM_AW,
  parameter int unsigned TAPS      = FIR_TAPS,
  parameter int unsigned SCALE_LSB = 12
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic [SAMPLE_W-1:0] ext_bfsk,
  input  logic                ext_sel,
  output logic                samp,
  output logic [SAMPLE_W-1:0] dat,
  output logic [SAMPLE_W-1:0] bfsk,
  output logic [SAMPLE_W-1:0] filter1,
  output logic [SAMPLE_W-1:0] filter2,
  output logic [FIR_OW-1:0]   k1,
  output logic [FIR_OW-1:0]   k2,
  output logic                z,
  output logic                data_bit
);
  localparam int unsigned DW = SAMPLE_W;

  logic rst;
  logic samp_en;
  logic [DW-1:0] car0, car1, bfsk_int, rx;
  logic signed [DW-1:0] dem1, dem2;
  logic signed [FIR_OW-1:0] sout1, sout2;
  logic v1, v2;

  assign rst = ~reset_n;

  sampling_gen #(.W(ACC_W_P), .CODE(ACC_W_P'(CODE_FSAM))) u_samp (
    .clk, .rst, .sam(), .samp, .samp_en);

  data_gen #(.W(ACC_W_P), .CODE(ACC_W_P'(CODE_DATA))) u_data (
    .clk, .rst, .en(samp_en), .data(), .data_bit);

  car_ddfs #(.W(ACC_W_P), .ROM_W(ROM_AW_P), .DW(DW),
             .CODE0(ACC_W_P'(CODE_CAR0)), .CODE1(ACC_W_P'(CODE_CAR1))) u_car (
    .clk, .rst, .en(samp_en), .phase0(), .phase1(), .carr0(car0), .carr1(car1));

  bfsk_ddfs #(.DW(DW)) u_bfsk (.car0, .car1, .data(data_bit), .bfsk(bfsk_int));

  assign bfsk = bfsk_int;
  assign rx   = ext_sel ? ext_bfsk : bfsk_int;

  coherent_mixer #(.DW(DW)) u_x1 (.clk, .bfsk_sig(rx), .car_sig(car0), .out_dem(dem1));
  coherent_mixer #(.DW(DW)) u_x2 (.clk, .bfsk_sig(rx), .car_sig(car1), .out_dem(dem2));

  fir_lpf #(.TAPS(TAPS), .DW(DW), .OW(FIR_OW)) u_lpf1 (
    .clk, .rst, .en(samp_en), .din(dem1), .sout(sout1), .sout_valid(v1));
  fir_lpf #(.TAPS(TAPS), .DW(DW), .OW(FIR_OW)) u_lpf2 (
    .clk, .rst, .en(samp_en), .din(dem2), .sout(sout2), .sout_valid(v2));

  assign k1 = sout1;
  assign k2 = sout2;

  scale_offset #(.IW(FIR_OW), .OW(DW), .LSB(SCALE_LSB)) u_sc1 (.clk, .k(sout1), .filter(filter1));
  scale_offset #(.IW(FIR_OW), .OW(DW), .LSB(SCALE_LSB)) u_sc2 (.clk, .k(sout2), .filter(filter2));

  decision #(.DW(DW)) u_dec (.clk, .rst, .y0(filter1), .y1(filter2), .z);

  // Data reference for the display DAC: full scale for 1, zero for 0.
  assign dat = {DW{data_bit}};

  // Both filters are started by the same strobe and finish together.
  a_lpf_lockstep: assert property (@(posedge clk) disable iff (rst) v1 == v2)
    else $error("bfsk_demod_top: filter channels out of step");
endmodule
