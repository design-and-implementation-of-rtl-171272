// End-to-end testbench of bfsk_demod_top at its default (full) size.
//
// The testbench keeps its own model of the three per-sample phase
// accumulators (1.2 kHz, 2.1 kHz, 100 Hz data) and of the cosine table, and
// looks at the design once per sample period, 700 clocks after each rising
// edge of samp, when the pipeline has settled.
//
// Part 1 (internal modulator): the data bit and the BFSK samples must match
// the model; wherever the data bit was steady for 30 samples on either side
// of 125 samples ago (the filters' group delay), z must equal it and the
// matching channel must sit well above mid-scale while the other sits near
// it.  The delay from each data edge to the matching edge of z is measured.
// Part 2: a reset, then ext_sel = 1 and the testbench itself plays the ADC,
// sending its own bit pattern (bits of 300 samples) as coherent BFSK;
// z must recover that pattern.
// Mechanisms counted, each of which must happen: sample strobes, decisions
// for bit 0 and for bit 1, rising and falling edges of z, samples taken
// from the external input, and a reset in mid-run.
module tb_bfsk_demod_top;
  localparam real TWO_PI = 6.283185307179586;
  localparam longint unsigned M24 = 64'd1 << 24;
  localparam int D = 125, WIN = 30;
  localparam int NA = 2400;             // part 1 samples (6 data periods)
  localparam int BITLEN = 300;
  localparam bit EXT_BITS [10] = '{1, 0, 0, 1, 1, 1, 0, 1, 0, 0};
  localparam int NB = 10 * BITLEN;

  logic clk = 1'b0, reset_n = 1'b0, ext_sel = 1'b0;
  logic [7:0] ext_bfsk = 8'd128;
  logic samp, z, data_bit;
  logic [7:0] dat, bfsk, filter1, filter2;
  logic [23:0] k1, k2;

  bfsk_demod_top dut (.clk, .reset_n, .ext_bfsk, .ext_sel, .samp, .dat, .bfsk,
                      .filter1, .filter2, .k1, .k2, .z, .data_bit);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  int n_strobe = 0, n_bit0 = 0, n_bit1 = 0, n_zrise = 0, n_zfall = 0, n_ext = 0, n_reset = 0;
  int n_delay = 0, dmin = 1 << 30, dmax = 0;
  bit hist [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int cos_word(longint unsigned ph);
    return $rtoi($floor(128.0 + 127.0 * $cos(TWO_PI * real'(ph >> 11) / 8192.0) + 0.5));
  endfunction

  // Wait for the next sample strobe and for the pipeline to settle.
  task automatic next_sample();
    @(posedge samp);
    repeat (700) @(posedge clk);
    #1;
    n_strobe++;
  endtask

  // Checks on the demodulated outputs at sample index n (history in hist).
  task automatic check_demod(input int n, input logic zprev, input int last_edge, input bit last_val);
    bit steady, b;
    if (zprev != z) begin
      if (z) n_zrise++; else n_zfall++;
      if (last_edge >= 0 && z == last_val) begin
        n_delay++;
        if (n - last_edge < dmin) dmin = n - last_edge;
        if (n - last_edge > dmax) dmax = n - last_edge;
      end
    end
    if (n < D + WIN + 260) return;     // filters still filling
    steady = 1'b1;
    b = hist[n - D];
    for (int i = n - D - WIN; i <= n - D + WIN; i++) if (hist[i] != b) steady = 1'b0;
    if (!steady) return;
    check(z == b, $sformatf("decision z=%0d want %0d (sample %0d)", z, b, n));
    if (b) begin
      n_bit1++;
      check(filter2 > 8'd150 && filter1 > 8'd118 && filter1 < 8'd138,
            $sformatf("levels for bit 1: %0d %0d", filter1, filter2));
    end else begin
      n_bit0++;
      check(filter1 > 8'd150 && filter2 > 8'd118 && filter2 < 8'd138,
            $sformatf("levels for bit 0: %0d %0d", filter1, filter2));
    end
  endtask

  initial begin
    longint unsigned p0, p1, pd;
    logic zprev;
    int last_edge;
    bit last_val, b;

    // ---------------- part 1: internal modulator ----------------
    repeat (5) @(posedge clk);
    #1 reset_n = 1'b1;
    p0 = 0; p1 = 0; pd = 0; zprev = z; last_edge = -1; last_val = 0;
    for (int n = 0; n < NA; n++) begin
      next_sample();
      p0 = (p0 + 503316) % M24; p1 = (p1 + 880804) % M24; pd = (pd + 41943) % M24;
      b = bit'(pd >> 23);
      hist.push_back(b);
      if (n > 0 && hist[n] != hist[n-1]) begin last_edge = n; last_val = b; end
      check(data_bit == b, "data bit");
      check(dat == (b ? 8'd255 : 8'd0), "data reference");
      check(int'(bfsk) == cos_word(b ? p1 : p0), $sformatf("bfsk %0d want %0d", bfsk, cos_word(b ? p1 : p0)));
      check_demod(n, zprev, last_edge, last_val);
      zprev = z;
    end

    // ---------------- part 2: reset, then external samples ----------------
    @(posedge clk); #1 reset_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(z == 1'b0 && k1 == '0 && k2 == '0, "outputs cleared by reset");
    n_reset++;
    ext_sel = 1'b1;
    reset_n = 1'b1;
    hist.delete();
    p0 = 0; p1 = 0; zprev = z; last_edge = -1; last_val = 0;
    for (int n = 0; n < NB; n++) begin
      next_sample();
      p0 = (p0 + 503316) % M24; p1 = (p1 + 880804) % M24;
      b = EXT_BITS[n / BITLEN];
      hist.push_back(b);
      if (n > 0 && hist[n] != hist[n-1]) begin last_edge = n; last_val = b; end
      ext_bfsk = 8'(cos_word(b ? p1 : p0));
      n_ext++;
      check_demod(n, zprev, last_edge, last_val);
      zprev = z;
    end

    $display("strobes=%0d bit0=%0d bit1=%0d zrise=%0d zfall=%0d ext=%0d resets=%0d",
             n_strobe, n_bit0, n_bit1, n_zrise, n_zfall, n_ext, n_reset);
    $display("data edge to z edge: %0d..%0d samples over %0d edges", dmin, dmax, n_delay);
    check(n_bit0 > 500 && n_bit1 > 500, "both bit values decided");
    check(n_zrise >= 5 && n_zfall >= 5, "z toggles both ways");
    check(n_ext == NB && n_reset == 1, "external path and reset exercised");
    check(n_delay >= 10 && dmin >= 115 && dmax <= 140, "demodulation delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NA + NB + 20) * 1251) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
