// Coherent mixer (X1 / X2): multiplies the BFSK sample by a local carrier.
//
// Both inputs are offset binary (128 = zero).  Each has 128 subtracted,
// which turns it into a two's-complement value in -128..127, and the two
// are multiplied as signed numbers.  The upper DW bits of the 2*DW-bit
// product, i.e. product/2^DW, are registered into out_dem: one clock of
// latency.  For a matching tone of amplitude 127 the output averages about
// +31 (A/2 after scaling); for the other tone it averages 0.  Taking the
// upper half of the product is this design's choice for the 8-bit output.
module coherent_mixer #(
  parameter int unsigned DW = 8
) (
  input  logic                 clk,
  input  logic [DW-1:0]        bfsk_sig,
  input  logic [DW-1:0]        car_sig,
  output logic signed [DW-1:0] out_dem
);
  localparam logic [DW-1:0] MID = DW'(1) << (DW - 1);

  logic signed [DW-1:0]   a, b;
  logic signed [2*DW-1:0] prod;

  always_comb begin
    a    = signed'(bfsk_sig - MID);
    b    = signed'(car_sig - MID);
    prod = a * b;
  end

  always_ff @(posedge clk) out_dem <= prod[2*DW-1 -: DW];
endmodule
