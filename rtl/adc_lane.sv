// adc_lane: one soft-core ADC lane (comparator outputs in, two timestamps
// per conversion frame out).
//
// The reference ramp rises while the ramp clock is high and falls while it is
// low; the comparator output hit is 1 while the ramp is above the analog
// input. The time of hit's rising edge measures the input on the charging
// part of the ramp, the time of its falling edge measures it on the
// discharging part. The lane samples hit at eight phases with
// tdc_sampling_unit and feeds the same 8-BIN code to two TDCs:
//   TDC_1: start = hit      (rising edge),  decoder on code
//   TDC_2: start = ~hit     (falling edge), decoder on ~code
// Both use the ramp clock as their stop and hand their timestamps to the data
// clock through their own tdc_sync.
//
// Interface: the four 800 MHz sampling clocks, clk_slow (100 MHz data clock,
// which is also the ramp/stop clock), rst, hit_p/hit_n from the differential
// input buffer; per frame, in the clk_slow domain, the rising- and
// falling-edge timestamps with found and valid flags.
// Timing: the results of the frame that begins at clk_slow rising edge f are
// on the outputs, with their valid flags, from edge f+2 until edge f+3.
//
// Two TDCs per lane, their start inputs hit and ~hit and one sampling unit on
// the P and N outputs of one input buffer follow the document; sharing one
// sampling unit between the two TDCs is this design's reading of how 24
// lanes fit in 48 I/O pins.
module adc_lane
  import adc_pkg::*;
#(
  parameter int unsigned RATIO  = DEFAULT_RATIO,
  localparam int unsigned CODE_W = code_width(RATIO)
) (
  input  logic              clk,
  input  logic              clk45,
  input  logic              clk90,
  input  logic              clk135,
  input  logic              clk_slow,
  input  logic              rst,
  input  logic              hit_p,
  input  logic              hit_n,
  output logic [CODE_W-1:0] rise_ts,
  output logic              rise_found,
  output logic              rise_valid,
  output logic [CODE_W-1:0] fall_ts,
  output logic              fall_found,
  output logic              fall_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic [PHASES-1:0] code;
  logic [CODE_W-1:0] r_ts, f_ts;
  logic              r_found, f_found, r_strobe, f_strobe;

  tdc_sampling_unit u_sampling (
    .clk, .clk45, .clk90, .clk135, .hit_p, .hit_n, .code
  );

  // TDC_1: rising edge of hit
  tdc_decoder #(.RATIO(RATIO)) u_tdc1_dec (
    .clk, .rst, .code(code), .stop(clk_slow),
    .ts(r_ts), .found(r_found), .strobe(r_strobe)
  );
  tdc_sync #(.CODE_W(CODE_W), .RATIO(RATIO)) u_tdc1_sync (
    .clk, .clk_slow, .rst,
    .in_ts(r_ts), .in_found(r_found), .in_strobe(r_strobe),
    .out_ts(rise_ts), .out_found(rise_found), .out_valid(rise_valid)
  );

  // TDC_2: rising edge of ~hit, i.e. falling edge of hit
  tdc_decoder #(.RATIO(RATIO)) u_tdc2_dec (
    .clk, .rst, .code(~code), .stop(clk_slow),
    .ts(f_ts), .found(f_found), .strobe(f_strobe)
  );
  tdc_sync #(.CODE_W(CODE_W), .RATIO(RATIO)) u_tdc2_sync (
    .clk, .clk_slow, .rst,
    .in_ts(f_ts), .in_found(f_found), .in_strobe(f_strobe),
    .out_ts(fall_ts), .out_found(fall_found), .out_valid(fall_valid)
  );
endmodule
