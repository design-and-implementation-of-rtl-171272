// Decision device: recovers the bit by comparing the two channels.
//
// y0 is the filtered output of the carrier-0 (bit 0) channel and y1 that
// of the carrier-1 (bit 1) channel, both unsigned offset binary.  On each
// clock z becomes 0 if y0 > y1 and 1 if y1 > y0; when they are equal it
// keeps its value (the rule for a tie is this design's choice).  rst
// clears z.  One clock of latency.
module decision #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] y0,
  input  logic [DW-1:0] y1,
  output logic          z
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)          z <= 1'b0;
    else if (y0 > y1) z <= 1'b0;
    else if (y1 > y0) z <= 1'b1;
  end
endmodule
