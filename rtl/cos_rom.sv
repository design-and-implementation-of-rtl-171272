// Cosine look-up ROM of the carrier synthesiser.
//
// 2^AW words of DW bits holding one cosine period in offset binary:
// word k = round(128 + 127*cos(2*pi*k/2^AW)), so every value lies in
// 1..255 and 128 is zero.  The table is filled from that formula when the
// design is loaded.  The 8192 x 8 size is the published one; the 127
// amplitude and rounding are this design's choice.  The read is
// registered: q shows the word at addr one clock after the edge.
module cos_rom
  import bfsk_pkg::*;
#(
  parameter int unsigned AW = ROM_AW,
  parameter int unsigned DW = SAMPLE_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] q
);
  logic [DW-1:0] rom [2**AW];

  initial begin
    for (int unsigned k = 0; k < 2**AW; k++) rom[k] = DW'(cos_rom_value(k, AW));
  end

  always_ff @(posedge clk) q <= rom[addr];
endmodule
