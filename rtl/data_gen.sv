// Data generator: the square-pulse test data of the modem.
//
// A 24-bit accumulator adds CODE (41943) once per sample (en = sample
// strobe); at 40 kHz it wraps every 2^24/41943 = 400.0 samples, so its MSB
// is a 100 Hz square wave, 200 samples high and 200 low.  That MSB is the
// transmitted bit.  data is the accumulator, data_bit its MSB; both change
// one clock after an enabled edge.  rst clears the accumulator.
module data_gen
  import bfsk_pkg::*;
#(
  parameter int unsigned W    = ACC_W,
  parameter logic [W-1:0] CODE = W'(CODE_DATA)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] data,
  output logic         data_bit
);
  phase_acc #(.W(W)) u_acc (.clk, .rst, .en, .step(CODE), .acc(data));
  assign data_bit = data[W-1];
endmodule
