// soft_adc_top: LANES soft-core ADCs built from FPGA input/output tiles.
//
// Each lane compares its analog input with an RC reference ramp in a
// differential input buffer and times the comparator's edges with an
// 8-phase TDC (see adc_lane). All lanes share the four 800 MHz sampling
// clocks (0, 45, 90, 135 degrees) and the 100 MHz clock that drives the
// ramps, stops the TDCs and clocks the output. Data_out gathers the two
// timestamps of every lane into one sample per frame.
//
// Interface: clk/clk45/clk90/clk135 and clk_slow from the clock manager
// (phase-locked, clk_slow rising together with clk); rst, synchronous, held
// for at least two clk_slow cycles; hit_p/hit_n, the P- and N-side outputs of
// each lane's input buffer. Outputs per lane: rise_code (time of the
// comparator's rising edge within the frame), fall_code (falling edge), each
// $clog2(RATIO)+3 bits in units of 1/8 sampling period, out_of_range, and one
// sample_valid per frame for all lanes.
// Timing: one sample per lane per clk_slow period (100 MSa/s). The sample of
// the frame that begins at clk_slow rising edge f is on the outputs, with
// sample_valid, from edge f+3 until edge f+4.
//
// 24 lanes, an 8:1 clock ratio and a 6-bit code at 100 MSa/s follow the
// document. The clock manager, the input buffers and the RC networks are
// analog or vendor parts outside this module; the ramp drive Vout is the
// clock manager's output and does not pass through this logic.
module soft_adc_top
  import adc_pkg::*;
#(
  parameter int unsigned LANES  = 24,
  parameter int unsigned RATIO  = DEFAULT_RATIO,
  localparam int unsigned CODE_W = code_width(RATIO)
) (
  input  logic                         clk,
  input  logic                         clk45,
  input  logic                         clk90,
  input  logic                         clk135,
  input  logic                         clk_slow,
  input  logic                         rst,
  input  logic [LANES-1:0]             hit_p,
  input  logic [LANES-1:0]             hit_n,
  output logic [LANES-1:0][CODE_W-1:0] rise_code,
  output logic [LANES-1:0][CODE_W-1:0] fall_code,
  output logic [LANES-1:0]             out_of_range,
  output logic                         sample_valid,
  output logic                         misaligned
);
  timeunit 1ps; timeprecision 1ps;

  logic [LANES-1:0][CODE_W-1:0] rise_ts, fall_ts;
  logic [LANES-1:0]             rise_found, rise_valid, fall_found, fall_valid;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    adc_lane #(.RATIO(RATIO)) u_lane (
      .clk, .clk45, .clk90, .clk135, .clk_slow, .rst,
      .hit_p(hit_p[l]), .hit_n(hit_n[l]),
      .rise_ts(rise_ts[l]), .rise_found(rise_found[l]), .rise_valid(rise_valid[l]),
      .fall_ts(fall_ts[l]), .fall_found(fall_found[l]), .fall_valid(fall_valid[l])
    );
  end

  data_out #(.LANES(LANES), .CODE_W(CODE_W)) u_data_out (
    .clk_slow, .rst,
    .rise_ts, .rise_found, .rise_valid,
    .fall_ts, .fall_found, .fall_valid,
    .rise_code, .fall_code, .out_of_range, .sample_valid, .misaligned
  );
endmodule
