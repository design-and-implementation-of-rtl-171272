// Scale stage between a low-pass filter and its DAC.
//
// Takes the OW-bit slice [LSB+OW-1:LSB] of the signed IW-bit filter output
// and adds 2^(OW-1) (128), turning the two's-complement value into the
// offset-binary code a unipolar DAC expects.  The addition wraps like the
// plain adder it models.  Registered: one clock of latency.  Which slice
// of the 24-bit filter output is taken is this design's choice: LSB = 12
// undoes the 2^12 scaling of the filter coefficients, so the stage has
// unity gain.
module scale_offset #(
  parameter int unsigned IW  = 24,
  parameter int unsigned OW  = 8,
  parameter int unsigned LSB = 12
) (
  input  logic                 clk,
  input  logic signed [IW-1:0] k,
  output logic [OW-1:0]        filter
);
  localparam logic [OW-1:0] MID = OW'(1) << (OW - 1);

  always_ff @(posedge clk) filter <= k[LSB +: OW] + MID;
endmodule
