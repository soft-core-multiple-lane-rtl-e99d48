// lvds_ramp_model: behavioural model of one lane's analog front end
// (testbench only): the RC network that turns the ramp clock into the
// reference ramp, and the differential input buffer that compares the ramp
// with the analog input. At every rising edge of the ramp clock it takes the
// input voltage for the frame and places the comparator edges at the times
// given by ramp_pkg; hit_p is the P-side output, hit_n its complement.
module lvds_ramp_model #(
  parameter int RATIO = 8
) (
  input  logic vout,
  input  real  vin,
  output logic hit_p,
  output logic hit_n
);
  timeunit 1ps; timeprecision 1ps;
  import ramp_pkg::*;

  logic hit = 1'b0;
  assign hit_p = hit;
  assign hit_n = ~hit;

  initial begin
    forever begin
      automatic real v;
      automatic int tr, tf;
      @(posedge vout);
      v  = vin;
      tr = rise_ps(v, RATIO);
      tf = fall_ps(v, RATIO);
      // the level for a new input is taken up 1 ps into the frame, so it
      // never coincides with the sample taken on the frame's first edge
      #1;
      if (tr < 0) hit = level(v, 1, RATIO);
      else begin
        hit = 1'b0;
        #(tr - 1);
        hit = 1'b1;
        #(tf - tr);
        hit = 1'b0;
      end
    end
  end
endmodule
