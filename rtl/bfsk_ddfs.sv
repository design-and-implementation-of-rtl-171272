// BFSK modulator (the BFSK-DDFS).
//
// A 2:1 multiplexer switches between the two carrier samples under the
// data bit: bit 0 sends carrier 0 (1.2 kHz), bit 1 sends carrier 1
// (2.1 kHz).  Because both carriers run continuously, the switch keeps the
// phase of each tone continuous.  Purely combinational.
module bfsk_ddfs #(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] car0,
  input  logic [DW-1:0] car1,
  input  logic          data,
  output logic [DW-1:0] bfsk
);
  always_comb bfsk = data ? car1 : car0;
endmodule
