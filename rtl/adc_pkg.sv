// adc_pkg: constants shared by the soft-core TDC-based ADC.
//
// The sampling unit of every lane combines two oversampling ISERDES, each
// giving four samples per sampling-clock cycle, into an 8-bin thermometer
// code ("8-BIN code"); a fine timestamp is therefore 3 bits wide. The number
// of sampling-clock cycles per conversion frame (RATIO) is a parameter of the
// modules; 8 is the ratio between the 800 MHz sampling clock and the
// 100 MHz data clock, which gives a 6-bit code at 100 MSa/s.
package adc_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Phases per sampling-clock period: 0, 45, ..., 315 degrees.
  localparam int unsigned PHASES  = 8;
  localparam int unsigned FINE_W  = $clog2(PHASES);
  // Sampling-clock cycles per frame (one ramp period, one output sample).
  localparam int unsigned DEFAULT_RATIO = 8;
  // Cycles from the sampling instant of a window to the sampling unit's
  // registered 8-BIN code for that window (see tdc_sampling_unit).
  localparam int unsigned SAMPLER_LATENCY = 3;

  // Width of a full timestamp (coarse cycle count, then fine bin).
  function automatic int unsigned code_width(int unsigned ratio);
    return $clog2(ratio) + FINE_W;
  endfunction
endpackage
