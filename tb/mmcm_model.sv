// mmcm_model: timing model of the clock manager (testbench only).
//
// Produces the four sampling clocks at 0, 45, 90 and 135 degrees and the
// data/ramp clock, RATIO sampling periods long, whose rising edge coincides
// with a rising edge of clk. BIN_PS is one eighth of the sampling period;
// 156 ps gives a 1248 ps period (about 801 MHz), so every phase lands on a
// whole picosecond. Clocks start low and begin toggling after START_PS.
module mmcm_model #(
  parameter int unsigned BIN_PS   = 156,
  parameter int unsigned RATIO    = 8,
  parameter int unsigned START_PS = 10000
) (
  output logic clk,
  output logic clk45,
  output logic clk90,
  output logic clk135,
  output logic clk_slow
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned HALF = 4 * BIN_PS;

  initial begin clk = 1'b0;    #(START_PS);              forever begin clk = ~clk;       #(HALF); end end
  initial begin clk45 = 1'b0;  #(START_PS + BIN_PS);     forever begin clk45 = ~clk45;   #(HALF); end end
  initial begin clk90 = 1'b0;  #(START_PS + 2*BIN_PS);   forever begin clk90 = ~clk90;   #(HALF); end end
  initial begin clk135 = 1'b0; #(START_PS + 3*BIN_PS);   forever begin clk135 = ~clk135; #(HALF); end end
  initial begin clk_slow = 1'b0; #(START_PS); forever begin clk_slow = ~clk_slow; #(RATIO * HALF); end end
endmodule
