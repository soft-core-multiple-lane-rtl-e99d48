// tb_soft_adc_top: the whole multi-lane ADC, end to end, at its default
// size (24 lanes, 8 sampling periods per frame, 6-bit codes).
// Every lane gets its own analog front-end model and its own sine input of
// a different frequency and phase. The sines overshoot the ramp range at
// both ends, so some frames leave the comparator stuck high or stuck low.
// The expected codes of every lane and frame come from scanning the modelled
// comparator level at the 64 sampling instants of the frame. Each frame's
// sample must be on the outputs, with sample_valid, in the data-clock period
// three after the frame began. Counted and required at least once: in-range
// conversions, inputs below and above the range, an edge found in sample 0
// of a period after sample 7 of the previous one, and all lanes reporting
// together without `misaligned`.
module tb_soft_adc_top;
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;
  import ramp_pkg::*;

  localparam int LANES = 24, RATIO = DEFAULT_RATIO;
  localparam int BIN = BIN_PS, T = 8 * BIN, P = RATIO * T, START = 10000;
  localparam int CODE_W = code_width(RATIO), NB = RATIO * 8;
  localparam int NF = 400;

  logic clk, clk45, clk90, clk135, clk_slow, rst;
  logic [LANES-1:0] hit_p, hit_n;
  real  vin [LANES];
  logic [LANES-1:0][CODE_W-1:0] rise_code, fall_code;
  logic [LANES-1:0] out_of_range;
  logic sample_valid, misaligned;

  real vins [NF][LANES];
  int  exp_r [NF][LANES], exp_f [NF][LANES];
  int  checks = 0, failures = 0, samples = 0;
  int  n_inrange = 0, n_low = 0, n_high = 0, n_window_edge = 0;

  mmcm_model #(.BIN_PS(BIN), .RATIO(RATIO), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);

  for (genvar l = 0; l < LANES; l++) begin : g_fe
    lvds_ramp_model #(.RATIO(RATIO)) u_fe (.vout(clk_slow), .vin(vin[l]), .hit_p(hit_p[l]), .hit_n(hit_n[l]));
  end

  soft_adc_top dut (
    .clk, .clk45, .clk90, .clk135, .clk_slow, .rst, .hit_p, .hit_n,
    .rise_code, .fall_code, .out_of_range, .sample_valid, .misaligned);

  function automatic bit h_at(int f, int l, int b);
    if (b == 0) return (f == 0) ? level(vins[0][l], 1, RATIO) : level(vins[f - 1][l], P, RATIO);
    return level(vins[f][l], b * BIN, RATIO);
  endfunction

  initial begin
    automatic real lo = v_low(RATIO), hi = v_high(RATIO);
    automatic real mid = (lo + hi) / 2.0, amp = (hi - lo) / 2.0 * 1.08;
    for (int f = 0; f < NF; f++)
      for (int l = 0; l < LANES; l++)
        vins[f][l] = mid + amp * $sin(2.0 * 3.14159265358979 * (real'(f) * (l + 1) / 397.0 + real'(l) / 24.0));
    for (int f = 0; f < NF; f++)
      for (int l = 0; l < LANES; l++) begin
        exp_r[f][l] = -1; exp_f[f][l] = -1;
        for (int b = 0; b < NB; b++) begin
          automatic bit cur = h_at(f, l, b);
          automatic bit prv = (b == 0) ? ((f == 0) ? cur : h_at(f - 1, l, NB - 1)) : h_at(f, l, b - 1);
          if (cur && !prv && exp_r[f][l] < 0) exp_r[f][l] = b;
          if (!cur && prv && exp_f[f][l] < 0) exp_f[f][l] = b;
        end
      end
  end

  initial begin
    rst = 1'b1;
    foreach (vin[l]) vin[l] = vins[0][l];
    #(START + 3 * P + T);
    rst = 1'b0;
  end
  always @(negedge clk_slow) begin
    automatic int f = int'(($time - 64'(START)) / 64'(P)) + 1;
    if (f < NF) foreach (vin[l]) vin[l] = vins[f][l];
  end

  always @(negedge clk_slow) begin
    automatic int s = int'(($time - 64'(START)) / 64'(P));
    automatic int f = s - 3;
    if (!rst && f >= 4 && f < NF) begin
      checks++;
      if (!sample_valid) begin
        failures++;
        if (failures < 10) $display("frame %0d: no sample_valid", f);
      end else begin
        samples++;
        for (int l = 0; l < LANES; l++) begin
          automatic bit ok = exp_r[f][l] >= 0 && exp_f[f][l] >= 0;
          checks++;
          if (out_of_range[l] !== !ok ||
              (ok && (rise_code[l] !== CODE_W'(exp_r[f][l]) || fall_code[l] !== CODE_W'(exp_f[f][l])))) begin
            failures++;
            if (failures < 10) $display("frame %0d lane %0d vin=%f: %0d %0d oor=%0d expected %0d %0d",
              f, l, vins[f][l], rise_code[l], fall_code[l], out_of_range[l], exp_r[f][l], exp_f[f][l]);
          end
          if (ok) begin
            n_inrange++;
            if ((exp_r[f][l] % 8 == 0 && exp_r[f][l] > 0) || (exp_f[f][l] % 8 == 0 && exp_f[f][l] > 0))
              n_window_edge++;
          end else if (vins[f][l] <= v_low(RATIO)) n_low++;
          else if (vins[f][l] >= v_high(RATIO)) n_high++;
        end
      end
    end
  end

  initial begin
    #(START + (NF + 4) * P);
    checks++;
    if (misaligned) begin failures++; $display("misaligned raised"); end
    checks++;
    if (n_inrange == 0 || n_low == 0 || n_high == 0 || n_window_edge == 0 || samples < NF - 8) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("samples=%0d lane conversions: in_range=%0d below_range=%0d above_range=%0d edge_at_period_start=%0d",
             samples, n_inrange, n_low, n_high, n_window_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(START + (NF + 50) * P);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
