// pet_timing_pkg: widths and sizes shared by the digital timing pick-off.
//
// One sample enters per clock from the ADC. A pulse is found by a digital
// leading-edge discriminator, its area (a fixed multiple of its amplitude,
// because the pulse shape is fixed) is summed over a window, the first
// sample is scaled to the amplitude of a reference pulse, and a table of
// the reference pulse's rising edge turns that voltage into the time since
// the pulse started. Time stamps count sample periods in their upper bits
// and 1/2**FRAC_W of a sample period in their lower FRAC_W bits.
//
// The 100 MHz sample clock comes from the design this follows; every width
// below is this implementation's choice (the source names no widths).
package pet_timing_pkg;
  // ADC word: unsigned, baseline removed, pulse positive.
  localparam int unsigned SAMPLE_W = 12;
  // Samples summed for the pulse area (160 ns at 100 MHz, ~4.6 fall times).
  localparam int unsigned AREA_WINDOW = 16;
  localparam int unsigned AREA_W = SAMPLE_W + $clog2(AREA_WINDOW);
  // The lookup address is the normalized first-sample voltage, so it has
  // the ADC's resolution.
  localparam int unsigned ADDR_W = SAMPLE_W;
  // Fine-time bits per sample period, and width of one table entry
  // (rise times of up to 2**(TIME_W-FRAC_W) sample periods).
  localparam int unsigned FRAC_W = 8;
  localparam int unsigned TIME_W = 12;
  // Coarse sample counter.
  localparam int unsigned CNT_W = 24;
  localparam int unsigned TS_W = CNT_W + FRAC_W;
endpackage
