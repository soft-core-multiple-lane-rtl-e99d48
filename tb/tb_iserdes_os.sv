// tb_iserdes_os: checks the oversampling ISERDES model.
// The input holds a random bit around each of the four sampling instants of
// every period (changing midway between instants); after the second CLK
// rising edge that follows a period, Q1..Q4 must equal the bits held at 0,
// 180, 90 and 270 degrees of that period.
module tb_iserdes_os;
  timeunit 1ps; timeprecision 1ps;

  localparam int T = 1248, Q = T / 4, N = 200, START = 10000;

  logic clk, clk90, d;
  logic [3:0] q;
  logic [3:0] bits [N];
  int checks = 0, failures = 0;

  iserdes_os dut (.clk, .clk90, .d, .q);

  initial begin clk = 0;   #(START);     forever begin clk = ~clk;     #(T/2); end end
  initial begin clk90 = 0; #(START + Q); forever begin clk90 = ~clk90; #(T/2); end end

  // stimulus: bit j of period n is held from nT + jQ - Q/2 to nT + jQ + Q/2
  initial begin
    foreach (bits[n]) bits[n] = 4'($urandom);
    d = 0;
    #(START - Q/2);
    for (int n = 0; n < N; n++)
      for (int j = 0; j < 4; j++) begin
        d = bits[n][j];
        #(Q);
      end
  end

  // check: period n on q after rising edge n+2, sampled a quarter period later
  initial begin
    #(START + 2*T + Q);
    for (int n = 0; n < N - 2; n++) begin
      checks++;
      if (q !== {bits[n][3], bits[n][1], bits[n][2], bits[n][0]}) begin
        failures++;
        if (failures < 10) $display("period %0d: q=%b expected %b", n, q,
          {bits[n][3], bits[n][1], bits[n][2], bits[n][0]});
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
