// Carrier DDFS: the two local oscillators of the modem.
//
// Two 24-bit accumulators advance once per sample (en) by CODE0 = 503316
// and CODE1 = 880804, i.e. 1.2 kHz and 2.1 kHz at a 40 kHz sample rate.
// Their 13 top bits [23:11] address one 8192 x 8 cosine ROM each, giving
// the offset-binary carriers carr0 and carr1.  The same two carriers drive
// both the BFSK modulator and the demodulator's mixers, which is what keeps
// transmitter and receiver in frequency and phase.  rst clears both phases.
// Timing: the phase changes one clock after an enabled edge and the ROM
// word one clock later.
module car_ddfs
  import bfsk_pkg::*;
#(
  parameter int unsigned W      = ACC_W,
  parameter int unsigned ROM_W  = ROM_AW,
  parameter int unsigned DW     = SAMPLE_W,
  parameter logic [W-1:0] CODE0 = W'(CODE_CAR0),
  parameter logic [W-1:0] CODE1 = W'(CODE_CAR1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [W-1:0]  phase0,
  output logic [W-1:0]  phase1,
  output logic [DW-1:0] carr0,
  output logic [DW-1:0] carr1
);
  phase_acc #(.W(W)) u_acc0 (.clk, .rst, .en, .step(CODE0), .acc(phase0));
  phase_acc #(.W(W)) u_acc1 (.clk, .rst, .en, .step(CODE1), .acc(phase1));

  cos_rom #(.AW(ROM_W), .DW(DW)) u_rom0 (.clk, .addr(phase0[W-1 -: ROM_W]), .q(carr0));
  cos_rom #(.AW(ROM_W), .DW(DW)) u_rom1 (.clk, .addr(phase1[W-1 -: ROM_W]), .q(carr1));
endmodule
