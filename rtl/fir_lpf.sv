// FIR low-pass filter (LPF-1 / LPF-2) of the demodulator.
//
// A direct-form FIR of TAPS = 251 taps (order 250): y[n] = sum h[i]*x[n-i].
// The taps are a Hamming-windowed sinc with cut-off FC_HZ = 450 Hz at
// FS_HZ = 40 kHz, scaled to unity DC gain and rounded to CW = 8-bit signed
// integers with COEF_FRAC = 12 fraction bits (so they sum to about 4096);
// they are computed from that formula (bfsk_pkg::fir_coef) when the design
// is loaded.  Order, length, window, cut-off, rates, 8-bit words and the
// 24-bit output follow the published filter; the fraction length and the
// hardware structure are this design's own.
//
// Structure: one multiplier-accumulator shared over all taps.  The sample
// history sits in a TAPS-word circular buffer.  A pulse on en (the sample
// strobe) writes din as the newest sample and starts a pass that walks the
// buffer from newest to oldest, multiplying each sample by its tap, one tap
// per clock.  After TAPS clocks the sum is registered in sout and
// sout_valid pulses for one clock: sout is valid TAPS clocks after the edge
// that saw en, and holds until the next result.  en must therefore come at
// most once every TAPS+1 clocks (at 50 MHz and 40 kHz there are 1250); an
// assertion checks it.  After rst the buffer is cleared to zero, one word
// per clock over TAPS clocks, during which en is ignored.  The product sum
// of 251 8x8-bit products stays well within the 24-bit accumulator.
module fir_lpf
  import bfsk_pkg::*;
#(
  parameter int unsigned TAPS      = FIR_TAPS,
  parameter int unsigned DW        = SAMPLE_W,
  parameter int unsigned CW        = 8,
  parameter int unsigned OW        = FIR_OW,
  parameter int unsigned COEF_FRAC = 12,
  parameter int unsigned FS_HZ     = 40000,
  parameter int unsigned FC_HZ     = 450
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [DW-1:0] din,
  output logic signed [OW-1:0] sout,
  output logic                 sout_valid
);
  localparam int unsigned IW = $clog2(TAPS);

  typedef enum logic [1:0] {CLEAR, IDLE, MAC} state_t;

  logic signed [CW-1:0] coef [TAPS];
  logic signed [DW-1:0] hist [TAPS];

  localparam real GAIN = fir_raw_sum(TAPS, real'(FC_HZ), real'(FS_HZ));

  initial begin
    for (int n = 0; n < TAPS; n++)
      coef[n] = CW'(fir_coef(n, TAPS, real'(FC_HZ), real'(FS_HZ), COEF_FRAC, GAIN));
  end

  state_t               state;
  logic [IW-1:0]        wp, rp, idx;
  logic signed [OW-1:0] acc, acc_next;
  logic signed [DW+CW-1:0] prod;

  always_comb begin
    prod     = hist[rp] * coef[idx];
    acc_next = acc + OW'(prod);
  end

  // Sample-history buffer: cleared after reset, then one write per sample.
  always_ff @(posedge clk) begin
    if (state == CLEAR)          hist[wp] <= '0;
    else if (state == IDLE && en) hist[wp] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= CLEAR;
      wp         <= '0;
      rp         <= '0;
      idx        <= '0;
      acc        <= '0;
      sout       <= '0;
      sout_valid <= 1'b0;
    end else begin
      sout_valid <= 1'b0;
      unique case (state)
        CLEAR: begin
          if (wp == IW'(TAPS - 1)) begin
            wp    <= '0;
            state <= IDLE;
          end else begin
            wp <= wp + 1'b1;
          end
        end
        IDLE: if (en) begin
          rp    <= wp;
          wp    <= (wp == IW'(TAPS - 1)) ? '0 : wp + 1'b1;
          idx   <= '0;
          acc   <= '0;
          state <= MAC;
        end
        MAC: begin
          rp <= (rp == '0) ? IW'(TAPS - 1) : rp - 1'b1;
          if (idx == IW'(TAPS - 1)) begin
            sout       <= acc_next;
            sout_valid <= 1'b1;
            state      <= IDLE;
          end else begin
            acc <= acc_next;
            idx <= idx + 1'b1;
          end
        end
        default: state <= CLEAR;
      endcase
    end
  end

  // A sample strobe must not arrive while a pass is running.
  a_en_spacing: assert property (@(posedge clk) disable iff (rst)
                                 en |-> state != MAC)
    else $error("fir_lpf: sample strobe arrived during a filter pass");
endmodule
