// tdc_sampling_unit: 8-phase sampling unit of one ADC lane.
//
// The comparator (a differential input buffer with complementary outputs)
// delivers hit on its P side and ~hit on its N side. The P-side ISERDES
// samples hit with CLK and CLK_90; the N-side ISERDES samples ~hit with
// CLK_45 and CLK_135. Between them the two take eight equidistant samples per
// sampling-clock period, 45 degrees (156 ps at 800 MHz) apart. The N-side
// samples are inverted back to hit polarity and everything is moved onto CLK
// and interleaved into one 8-BIN code per period:
//
//   code[k] = hit as sampled at k*45 degrees after the CLK rising edge.
//
// Interface: clk, clk45, clk90, clk135 (one frequency, phases 0/45/90/135);
// hit_p and hit_n (comparator outputs); code (CLK domain).
// Timing: the eight samples of the period that starts at CLK rising edge n
// are on `code` after CLK rising edge n+3 (adc_pkg::SAMPLER_LATENCY) and stay
// for one period. The P-side outputs change on CLK edge n+2 and the N-side
// outputs 45 degrees later; one register on CLK edge n+3 picks up both, so
// the two halves of a code come from the same period.
//
// The P/N split, the clock pairs of each ISERDES and the merging into one
// 8-BIN code follow the document; the output register and the bit order of
// the code are this design's choice.
module tdc_sampling_unit
  import adc_pkg::*;
(
  input  logic              clk,
  input  logic              clk45,
  input  logic              clk90,
  input  logic              clk135,
  input  logic              hit_p,
  input  logic              hit_n,
  output logic [PHASES-1:0] code
);
  timeunit 1ps; timeprecision 1ps;

  logic [3:0] q_p, q_n;     // Q1..Q4 of each ISERDES (0,180,90,270 of its clocks)

  iserdes_os u_iserdes_p (.clk(clk),   .clk90(clk90),  .d(hit_p), .q(q_p));
  iserdes_os u_iserdes_n (.clk(clk45), .clk90(clk135), .d(hit_n), .q(q_n));

  // N side: Q1 at 45, Q2 at 225, Q3 at 135, Q4 at 315 degrees, sampling ~hit.
  always_ff @(posedge clk)
    code <= { ~q_n[3], q_p[3], ~q_n[1], q_p[1],
              ~q_n[2], q_p[2], ~q_n[0], q_p[0] };
endmodule
