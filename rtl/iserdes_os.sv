// iserdes_os: one ISERDES in oversample mode, modelled as plain flip-flops.
//
// The input (hit) is sampled four times per CLK period: on the rising and the
// falling edge of CLK (0 and 180 degrees) and on the rising and the falling
// edge of CLK_90 (90 and 270 degrees). A second rank moves the 0/90-degree
// samples onto the CLK rising edge and the 180/270-degree samples onto the
// CLK_90 rising edge, and a third rank moves all four onto the same CLK
// rising edge, so Q1..Q4 change together once per CLK period.
//
// Interface: clk, clk90 (same frequency, clk90 lags by a quarter period),
// d (asynchronous hit), q[0..3] = Q1..Q4 = samples at 0, 180, 90, 270 deg.
// Timing: the four samples taken in the period that starts at CLK rising edge
// n appear on q after CLK rising edge n+2 and hold for one period.
//
// The three ranks, their row order (CLK, ~CLK, CLK_90, ~CLK_90) and which
// clock drives each register follow the published flip-flop diagram of the
// oversampling ISERDES. Which edge of each clock the second and third ranks
// use is this design's choice (rising edges, giving the timing above).
module iserdes_os (
  input  logic       clk,
  input  logic       clk90,
  input  logic       d,
  output logic [3:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic s_p0, s_n0, s_p90, s_n90;     // first rank: the four samples
  logic r_p0, r_n0, r_p90, r_n90;     // second rank

  always_ff @(posedge clk)   s_p0  <= d;
  always_ff @(negedge clk)   s_n0  <= d;
  always_ff @(posedge clk90) s_p90 <= d;
  always_ff @(negedge clk90) s_n90 <= d;

  always_ff @(posedge clk) begin
    r_p0  <= s_p0;
    r_p90 <= s_p90;
  end
  always_ff @(posedge clk90) begin
    r_n0  <= s_n0;
    r_n90 <= s_n90;
  end

  always_ff @(posedge clk) q <= {r_n90, r_p90, r_n0, r_p0};
endmodule
