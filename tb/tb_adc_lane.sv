// tb_adc_lane: one ADC lane with its analog front end modelled.
// The input is swept slowly across the whole ramp range (a density test:
// every code between the lowest and the highest reached must appear, for
// both TDCs), then random inputs follow,
// including inputs below and above the ramp, which leave the comparator
// stuck. For every frame the expected results are found by scanning the
// comparator level at each of the 64 sampling instants of the frame: the
// first rising transition for TDC_1, the first falling one for TDC_2. Each
// result must arrive in the data-clock period two after the frame's end.
module tb_adc_lane;
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;
  import ramp_pkg::*;

  localparam int RATIO = 8, BIN = BIN_PS, T = 8 * BIN, P = RATIO * T, START = 10000;
  localparam int CODE_W = code_width(RATIO), NB = RATIO * 8;
  localparam int NSWEEP = 1024, NRAND = 400, NF = NSWEEP + NRAND;

  logic clk, clk45, clk90, clk135, clk_slow, rst;
  logic hit_p, hit_n;
  real  vin;
  logic [CODE_W-1:0] rise_ts, fall_ts;
  logic rise_found, rise_valid, fall_found, fall_valid;

  real vins [NF];
  int  exp_r [NF], exp_f [NF];      // -1: none
  int  hist_r [NB], hist_f [NB];
  int  checks = 0, failures = 0, n_none = 0, n_inrange = 0;

  mmcm_model #(.BIN_PS(BIN), .RATIO(RATIO), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);
  lvds_ramp_model #(.RATIO(RATIO)) u_fe (.vout(clk_slow), .vin, .hit_p, .hit_n);

  adc_lane #(.RATIO(RATIO)) dut (
    .clk, .clk45, .clk90, .clk135, .clk_slow, .rst, .hit_p, .hit_n,
    .rise_ts, .rise_found, .rise_valid, .fall_ts, .fall_found, .fall_valid);

  function automatic bit h_at(int f, int b);
    if (b == 0) return (f == 0) ? level(vins[0], 1, RATIO) : level(vins[f - 1], P, RATIO);
    return level(vins[f], b * BIN, RATIO);
  endfunction

  initial begin
    automatic real lo = v_low(RATIO), hi = v_high(RATIO);
    for (int f = 0; f < NSWEEP; f++) vins[f] = lo + (hi - lo) * (real'(f) + 0.5) / real'(NSWEEP);
    for (int f = NSWEEP; f < NF; f++)
      vins[f] = (lo - 0.1) + (hi - lo + 0.2) * real'($urandom_range(0, 100000)) / 100000.0;
    for (int f = 0; f < NF; f++) begin
      exp_r[f] = -1; exp_f[f] = -1;
      for (int b = 0; b < NB; b++) begin
        automatic bit cur = h_at(f, b);
        automatic bit prv = (b == 0) ? ((f == 0) ? cur : h_at(f - 1, NB - 1)) : h_at(f, b - 1);
        if (cur && !prv && exp_r[f] < 0) exp_r[f] = b;
        if (!cur && prv && exp_f[f] < 0) exp_f[f] = b;
      end
    end
  end

  // input for frame f is applied in the middle of frame f-1
  initial begin
    vin = 0.0;
    rst = 1'b1;
    vin = vins[0];
    #(START + 3 * P + T);
    rst = 1'b0;
  end
  always @(negedge clk_slow) begin
    automatic int f = int'(($time - 64'(START)) / 64'(P)) + 1;
    if (f < NF) vin = vins[f];
  end

  // results in data-clock period f+2 belong to frame f
  always @(negedge clk_slow) begin
    automatic int s = int'(($time - 64'(START)) / 64'(P));
    automatic int f = s - 2;
    if (!rst && f >= 4 && f < NF) begin
      checks += 2;
      if (!rise_valid || !fall_valid) begin
        failures++;
        if (failures < 10) $display("frame %0d: valid %0d %0d", f, rise_valid, fall_valid);
      end else begin
        if (rise_found !== (exp_r[f] >= 0) || (exp_r[f] >= 0 && rise_ts !== CODE_W'(exp_r[f]))) begin
          failures++;
          if (failures < 10) $display("frame %0d vin=%f: rise %0d/%0d expected %0d", f, vins[f], rise_found, rise_ts, exp_r[f]);
        end
        if (fall_found !== (exp_f[f] >= 0) || (exp_f[f] >= 0 && fall_ts !== CODE_W'(exp_f[f]))) begin
          failures++;
          if (failures < 10) $display("frame %0d vin=%f: fall %0d/%0d expected %0d", f, vins[f], fall_found, fall_ts, exp_f[f]);
        end
        if (f < NSWEEP && rise_found) hist_r[rise_ts]++;
        if (f < NSWEEP && fall_found) hist_f[fall_ts]++;
        if (rise_found && fall_found) n_inrange++;
        if (!rise_found && !fall_found) n_none++;
      end
    end
  end

  initial begin
    int miss_r, miss_f, first_r, last_r, first_f, last_f;
    #(START + (NF + 3) * P);
    miss_r = 0; miss_f = 0; first_r = NB; last_r = 0; first_f = NB; last_f = 0;
    for (int b = 0; b < NB; b++) begin
      if (hist_r[b] > 0) begin if (b < first_r) first_r = b; last_r = b; end
      if (b > 0 && hist_f[b] > 0) begin if (b < first_f) first_f = b; last_f = b; end
    end
    for (int b = first_r; b <= last_r; b++) if (hist_r[b] == 0) miss_r++;
    for (int b = first_f; b <= last_f; b++) if (hist_f[b] == 0) miss_f++;
    checks++;
    if (miss_r > 0 || miss_f > 0 || n_none == 0 || n_inrange == 0) begin
      failures++;
      $display("coverage: missing codes rise=%0d fall=%0d none=%0d in_range=%0d", miss_r, miss_f, n_none, n_inrange);
    end
    $display("rise codes %0d..%0d, fall codes %0d..%0d, in-range frames %0d, out-of-range frames %0d",
             first_r, last_r, first_f, last_f, n_inrange, n_none);
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
