// ramp_pkg: numbers of the analog front end, for the testbench models.
//
// The ramp clock (high for the first half of a frame, low for the second)
// drives an RC network of time constant TAU_PS from a VH swing. In the
// periodic steady state the ramp starts each frame at V0 = VH*a/(1+a) and
// peaks at VEND = VH/(1+a), with a = exp(-HALF/TAU). With TAU = HALF/3 and
// VH = 3.3 V the comparable input range is about 0.16 V to 3.14 V.
// While charging, Vref(t) = VH - (VH - V0) exp(-t/TAU); while discharging,
// Vref(t) = VEND exp(-(t - HALF)/TAU). The comparator output hit is 1 while
// Vref > Vin, so it rises at t_r = TAU ln((VH - V0)/(VH - Vin)) and falls at
// t_f = HALF + TAU ln(VEND/Vin). Edge times are rounded to whole
// picoseconds and moved by 1 ps when they would land exactly on a sampling
// instant (a multiple of BIN_PS), so the expected sample is never a tie.
package ramp_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int  BIN_PS = 156;
  localparam real VH     = 3.3;

  function automatic int frame_ps(int ratio);
    return ratio * 8 * BIN_PS;
  endfunction

  function automatic real tau_ps(int ratio);
    return real'(frame_ps(ratio)) / 6.0;
  endfunction

  function automatic real v_low(int ratio);
    real a = $exp(-real'(frame_ps(ratio) / 2) / tau_ps(ratio));
    return VH * a / (1.0 + a);
  endfunction

  function automatic real v_high(int ratio);
    real a = $exp(-real'(frame_ps(ratio) / 2) / tau_ps(ratio));
    return VH / (1.0 + a);
  endfunction

  function automatic int untie(real t);
    int p = int'($floor(t + 0.5));
    if (p % BIN_PS == 0) p++;
    return p;
  endfunction

  // rising edge of hit within the frame; -1 when there is none
  function automatic int rise_ps(real vin, int ratio);
    if (vin <= v_low(ratio) || vin >= v_high(ratio)) return -1;
    return untie(tau_ps(ratio) * $ln((VH - v_low(ratio)) / (VH - vin)));
  endfunction

  // falling edge of hit within the frame; -1 when there is none
  function automatic int fall_ps(real vin, int ratio);
    if (vin <= v_low(ratio) || vin >= v_high(ratio)) return -1;
    return untie(real'(frame_ps(ratio) / 2) + tau_ps(ratio) * $ln(v_high(ratio) / vin));
  endfunction

  // hit level at offset off_ps into a frame converting vin
  function automatic bit level(real vin, int off_ps, int ratio);
    if (vin <= v_low(ratio)) return 1'b1;
    if (vin >= v_high(ratio)) return 1'b0;
    return off_ps >= rise_ps(vin, ratio) && off_ps < fall_ps(vin, ratio);
  endfunction
endpackage
