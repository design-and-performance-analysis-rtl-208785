// integrator_pkg: constants and types shared by the three-channel digital
// integrate-and-dump module.
//
// The numbers follow the radiometer design: 12-bit samples, three channels,
// a 960 kHz main clock and a 16 kHz sampling rate per channel, and averaging
// factors of 128, 32 and 16 for channels 1, 2 and 3 (8 ms, 2 ms and 1 ms of
// integration). The number of clocks per sampling period (60) is derived here
// from the two rates; the serial frame format that uses those clocks is this
// design's own choice (see serial_to_parallel).
package integrator_pkg;

  // Sample word width of the 12-bit successive-approximation ADC.
  localparam int unsigned SAMPLE_W = 12;
  // Number of radiometer channels handled by one integrator.
  localparam int unsigned NUM_CH   = 3;
  // Width of a channel index.
  localparam int unsigned CH_W     = $clog2(NUM_CH);

  // Main clock and per-channel sampling rate.
  localparam int unsigned CLK_HZ   = 960_000;
  localparam int unsigned FS_HZ    = 16_000;
  // Main-clock cycles in one sampling period.
  localparam int unsigned FRAME_CLKS = CLK_HZ / FS_HZ;

  // Averaging factor (samples integrated per dump) of channels 1, 2, 3.
  localparam int unsigned AVG_N_CH1 = 128;
  localparam int unsigned AVG_N_CH2 = 32;
  localparam int unsigned AVG_N_CH3 = 16;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [CH_W-1:0]     ch_idx_t;

  // Accumulator width that holds the sum of n full-scale samples.
  function automatic int unsigned acc_width(int unsigned n);
    return SAMPLE_W + $clog2(n);
  endfunction

endpackage
