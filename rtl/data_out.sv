// data_out: output stage of the multi-lane ADC, in the data-clock domain.
//
// Every lane delivers, once per frame, a rising-edge and a falling-edge
// timestamp, each with a found flag (a start edge was seen) and a valid
// strobe. data_out registers the two timestamps of every lane together as
// that lane's sample for the frame, raises sample_valid for one cycle when
// all 2*LANES results of a frame have arrived, and flags per lane an input
// out of the ramp's range (an edge that was not found). Results that arrive
// for only some lanes are held back until every lane has reported; a lane
// reporting twice before the others raises `misaligned`.
//
// Interface: clk_slow, rst (synchronous), per-lane results from adc_lane;
// rise_code/fall_code/out_of_range/sample_valid out.
// Timing: when all lanes report in the same cycle (the normal case, since all
// lanes share the clocks), the sample is out one clk_slow cycle later.
// The document names this block (Data_out, "data decoder") and says the data
// is sent out on the slow clock; what it does with the two timestamps beyond
// that is not described, and the word layout, the out_of_range flag and the
// per-frame gathering are this design's choice.
module data_out
  import adc_pkg::*;
#(
  parameter int unsigned LANES  = 24,
  parameter int unsigned CODE_W = code_width(DEFAULT_RATIO)
) (
  input  logic                         clk_slow,
  input  logic                         rst,
  input  logic [LANES-1:0][CODE_W-1:0] rise_ts,
  input  logic [LANES-1:0]             rise_found,
  input  logic [LANES-1:0]             rise_valid,
  input  logic [LANES-1:0][CODE_W-1:0] fall_ts,
  input  logic [LANES-1:0]             fall_found,
  input  logic [LANES-1:0]             fall_valid,
  output logic [LANES-1:0][CODE_W-1:0] rise_code,
  output logic [LANES-1:0][CODE_W-1:0] fall_code,
  output logic [LANES-1:0]             out_of_range,
  output logic                         sample_valid,
  output logic                         misaligned
);
  timeunit 1ps; timeprecision 1ps;

  logic [LANES-1:0][CODE_W-1:0] r_buf, f_buf;
  logic [LANES-1:0]             r_ok, f_ok;
  logic [LANES-1:0]             r_have, f_have;
  logic [LANES-1:0]             r_have_n, f_have_n;
  logic                         complete;

  assign r_have_n = r_have | rise_valid;
  assign f_have_n = f_have | fall_valid;
  assign complete = &{r_have_n, f_have_n};

  always_ff @(posedge clk_slow) begin
    if (rst) begin
      r_buf        <= '0;
      f_buf        <= '0;
      r_ok         <= '0;
      f_ok         <= '0;
      r_have       <= '0;
      f_have       <= '0;
      rise_code    <= '0;
      fall_code    <= '0;
      out_of_range <= '0;
      sample_valid <= 1'b0;
      misaligned   <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (|(r_have & rise_valid) || |(f_have & fall_valid)) misaligned <= 1'b1;
      for (int l = 0; l < LANES; l++) begin
        if (rise_valid[l]) begin
          r_buf[l] <= rise_ts[l];
          r_ok[l]  <= rise_found[l];
        end
        if (fall_valid[l]) begin
          f_buf[l] <= fall_ts[l];
          f_ok[l]  <= fall_found[l];
        end
      end
      if (complete) begin
        r_have <= '0;
        f_have <= '0;
        sample_valid <= 1'b1;
        for (int l = 0; l < LANES; l++) begin
          rise_code[l]    <= rise_valid[l] ? rise_ts[l] : r_buf[l];
          fall_code[l]    <= fall_valid[l] ? fall_ts[l] : f_buf[l];
          out_of_range[l] <= ~((rise_valid[l] ? rise_found[l] : r_ok[l]) &
                               (fall_valid[l] ? fall_found[l] : f_ok[l]));
        end
      end else begin
        r_have <= r_have_n;
        f_have <= f_have_n;
      end
    end
  end
endmodule
