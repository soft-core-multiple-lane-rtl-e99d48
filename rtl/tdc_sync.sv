// tdc_sync: data synchronisation unit of one TDC, from the sampling clock
// (800 MHz) to the slow data clock (100 MHz).
//
// Both clocks come from the same clock manager, so their phase relation is
// fixed. On each strobe from the decoder the result is copied into a holding
// register and a sequence bit is toggled; the holding register then stays
// unchanged for a whole frame (RATIO sampling periods, one data-clock
// period). The data clock samples the holding register and the sequence bit
// together and raises `valid` for one data-clock cycle whenever the sequence
// bit has changed. This works because the strobe lands a few sampling periods
// after the data-clock edge (tdc_decoder plus one register here), well away
// from the next data-clock edge.
//
// Interface: clk (sampling clock), clk_slow (data clock), rst (synchronous,
// held for at least one data-clock cycle), in_ts/in_found/in_strobe from
// tdc_decoder; out_ts/out_found/out_valid in the data-clock domain.
// The document names this unit and its two clock domains; the holding
// register with a sequence bit is this design's choice.
module tdc_sync
  import adc_pkg::*;
#(
  parameter int unsigned CODE_W = code_width(DEFAULT_RATIO),
  parameter int unsigned RATIO  = DEFAULT_RATIO
) (
  input  logic              clk,
  input  logic              clk_slow,
  input  logic              rst,
  input  logic [CODE_W-1:0] in_ts,
  input  logic              in_found,
  input  logic              in_strobe,
  output logic [CODE_W-1:0] out_ts,
  output logic              out_found,
  output logic              out_valid
);
  timeunit 1ps; timeprecision 1ps;

  logic [CODE_W-1:0] hold_ts;
  logic              hold_found;
  logic              seq;
  logic              seq_s;

  // sampling-clock side
  always_ff @(posedge clk) begin
    if (rst) begin
      hold_ts    <= '0;
      hold_found <= 1'b0;
      seq        <= 1'b0;
    end else if (in_strobe) begin
      hold_ts    <= in_ts;
      hold_found <= in_found;
      seq        <= ~seq;
    end
  end

  // data-clock side
  always_ff @(posedge clk_slow) begin
    if (rst) begin
      seq_s     <= 1'b0;
      out_ts    <= '0;
      out_found <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      seq_s     <= seq;
      out_ts    <= hold_ts;
      out_found <= hold_found;
      out_valid <= seq ^ seq_s;
    end
  end

  // The holding register may change at most once per frame.
  int unsigned since_strobe;
  always_ff @(posedge clk) begin
    if (rst) since_strobe <= RATIO;
    else if (in_strobe) begin
      assert (since_strobe + 1 >= RATIO)
        else $error("tdc_sync: strobes %0d periods apart", since_strobe + 1);
      since_strobe <= 0;
    end else if (since_strobe < RATIO) since_strobe <= since_strobe + 1;
  end
endmodule
