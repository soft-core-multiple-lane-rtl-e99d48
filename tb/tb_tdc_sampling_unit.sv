// tb_tdc_sampling_unit: checks the 8-phase sampling unit.
// hit takes a random value around each of the eight sampling instants of a
// period (changing midway between them); hit_n is its complement. Three
// sampling periods later the 8-BIN code must hold those eight bits in phase
// order.
module tb_tdc_sampling_unit;
  timeunit 1ps; timeprecision 1ps;

  localparam int BIN = 156, T = 8 * BIN, N = 200, START = 10000;

  logic clk, clk45, clk90, clk135, clk_slow;
  logic hit;
  logic [7:0] code;
  logic [7:0] bits [N];
  int checks = 0, failures = 0;

  mmcm_model #(.BIN_PS(BIN), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);

  tdc_sampling_unit dut (.clk, .clk45, .clk90, .clk135, .hit_p(hit), .hit_n(~hit), .code);

  initial begin
    foreach (bits[n]) bits[n] = 8'($urandom);
    hit = 0;
    #(START - BIN/2);
    for (int n = 0; n < N; n++)
      for (int k = 0; k < 8; k++) begin
        hit = bits[n][k];
        #(BIN);
      end
  end

  initial begin
    #(START + 3*T + 2*BIN);
    for (int n = 0; n < N - 3; n++) begin
      checks++;
      if (code !== bits[n]) begin
        failures++;
        if (failures < 10) $display("period %0d: code=%b expected %b", n, code, bits[n]);
      end
      #(T);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(START + (N + 20) * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
