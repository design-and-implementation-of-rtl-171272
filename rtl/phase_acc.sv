// Phase accumulator (the DDFS core).
//
// acc grows by step on every clock where en is high and wraps modulo
// 2^W; its top bits are the phase of the synthesised waveform, and its MSB
// alone is a square wave of frequency step*f_en/2^W.  rst clears it at
// once (asynchronous, like the aclr input of the accumulators it models);
// the clear and the step take effect at the clock edge, so acc is the
// registered running sum with one clock of latency.
module phase_acc #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] step,
  output logic [W-1:0] acc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc + step;
  end
endmodule
