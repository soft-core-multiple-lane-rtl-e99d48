// tdc_decoder: decode module of one TDC (start = a rising edge in the 8-BIN
// code, stop = the reference clock that also drives the ramp).
//
// Every sampling-clock cycle the decoder receives the eight phase samples of
// one period. It looks for the first 0->1 transition, taking the last sample
// of the previous period as the predecessor of sample 0, and turns its
// position into a 3-bit fine time. A coarse counter counts sampling-clock
// periods since the stop clock's rising edge; together they form the binary
// timestamp {coarse, fine} of the first start edge within a frame, in units
// of one eighth of the sampling-clock period (156 ps at 800 MHz). With RATIO
// periods per frame the timestamp has $clog2(RATIO)+3 bits: 6 bits at the
// default of 8, 3 bits (fine time only) when every sampling period is a
// frame (RATIO = 1, the stop clock then being the sampling clock itself). A frame without a start edge (input outside the ramp's
// range) is reported with found = 0.
//
// The stop clock is sampled on the falling edge of clk (it is phase-locked
// to clk, so the falling edge is half a period away from its edges) and
// delayed by the sampling unit's latency, so the frame boundary lines up with
// the code of the period in which the stop clock rose.
//
// Interface: clk, rst (synchronous, active high), code (from
// tdc_sampling_unit, or its inverse to time falling edges), stop.
// Timing: for a frame whose stop edge coincides with clk rising edge n, the
// result is on ts/found from clk edge n + RATIO + SAMPLER_LATENCY + 1
// (n + 12 at the defaults), with strobe high for that one period; one result
// per frame, the first for the first whole frame after reset. The document gives the start/stop scheme, the 8-phase
// code, the 800 MHz decoder and the 64-fold resolution of the timestamp over
// the coarse period; the first-transition search, the frame handling and the
// found flag are this design's choices.
module tdc_decoder
  import adc_pkg::*;
#(
  parameter int unsigned RATIO  = DEFAULT_RATIO,
  localparam int unsigned CW    = (RATIO > 1) ? $clog2(RATIO) : 1,
  localparam int unsigned CODE_W = code_width(RATIO)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [PHASES-1:0] code,
  input  logic              stop,
  output logic [CODE_W-1:0] ts,
  output logic              found,
  output logic              strobe
);
  timeunit 1ps; timeprecision 1ps;

  // ---- stop clock: sample on the falling edge, align with the code ----
  logic                       stop_n;
  logic [SAMPLER_LATENCY:0]   stop_d;     // stop level per period, newest in bit 0
  logic                       frame_start;

  always_ff @(negedge clk) stop_n <= stop;

  always_ff @(posedge clk) begin
    if (rst) stop_d <= '1;                // no false edge right after reset
    else     stop_d <= {stop_d[SAMPLER_LATENCY-1:0], stop_n};
  end
  // stop_d[LAT-1] holds the stop level of the period whose code is on `code`.
  // With one period per frame every period starts a frame.
  if (RATIO == 1) begin : g_every_period
    assign frame_start = 1'b1;
  end else begin : g_stop_edge
    assign frame_start = stop_d[SAMPLER_LATENCY-1] & ~stop_d[SAMPLER_LATENCY];
  end

  // ---- fine time: first 0->1 transition among the eight samples ----
  logic              prev_last;
  logic [PHASES-1:0] rise;
  logic              edge_any;
  logic [FINE_W-1:0] fine;

  always_comb begin
    rise     = code & ~{code[PHASES-2:0], prev_last};
    edge_any = |rise;
    fine     = '0;
    for (int k = PHASES - 1; k >= 0; k--)
      if (rise[k]) fine = FINE_W'(k);
  end

  // ---- coarse count and frame accumulation ----
  logic [CW-1:0]     coarse;
  logic              acc_found;
  logic [CODE_W-1:0] acc_ts;
  logic              started;
  logic [CW-1:0]     coarse_next;

  assign coarse_next = (coarse == CW'(RATIO - 1)) ? coarse : coarse + 1'b1;

  always_ff @(posedge clk) begin
    prev_last <= code[PHASES-1];
    if (rst) begin
      coarse    <= '0;
      acc_found <= 1'b0;
      acc_ts    <= '0;
      started   <= 1'b0;
      ts        <= '0;
      found     <= 1'b0;
      strobe    <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (frame_start) begin
        if (started) begin
          ts     <= acc_ts;
          found  <= acc_found;
          strobe <= 1'b1;
        end
        started   <= 1'b1;
        coarse    <= '0;
        acc_found <= edge_any;
        acc_ts    <= CODE_W'(fine);
      end else begin
        coarse <= coarse_next;
        if (!acc_found && edge_any) begin
          acc_found <= 1'b1;
          acc_ts    <= CODE_W'({coarse_next, fine});
        end
      end
    end
  end

  // The stop clock must span exactly RATIO sampling-clock periods.
  always_ff @(posedge clk)
    if (!rst && frame_start && started)
      assert (coarse == CW'(RATIO - 1))
        else $error("tdc_decoder: stop period is not %0d sampling periods", RATIO);
endmodule
