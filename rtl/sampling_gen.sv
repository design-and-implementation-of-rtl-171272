// Sampling signal generator.
//
// A 24-bit accumulator adds CODE (13422) on every 50 MHz clock, so its MSB
// is a square wave at 13422*50e6/2^24 = 40000.4 Hz: the sampling signal of
// the modem, brought out as samp.  The published design clocks the sample
// domain directly from this MSB; here the whole design runs on the 50 MHz
// clock and samp_en, a one-clock pulse on each rising edge of the MSB,
// enables the sample-rate registers instead.  samp_en is high one clock
// after the MSB rises (every 1249 or 1250 clocks).
module sampling_gen
  import bfsk_pkg::*;
#(
  parameter int unsigned W    = ACC_W,
  parameter logic [W-1:0] CODE = W'(CODE_FSAM)
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] sam,      // accumulator value
  output logic         samp,     // 40 kHz square wave (sam MSB)
  output logic         samp_en   // one-clock strobe per sampling period
);
  logic msb_q;

  phase_acc #(.W(W)) u_acc (.clk, .rst, .en(1'b1), .step(CODE), .acc(sam));

  assign samp = sam[W-1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      msb_q   <= 1'b0;
      samp_en <= 1'b0;
    end else begin
      msb_q   <= samp;
      samp_en <= samp & ~msb_q;
    end
  end
endmodule
