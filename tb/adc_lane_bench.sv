// adc_lane_bench: one lane with its clock and analog front-end models, run
// through the two measurements the converter is characterised with
// (testbench only).
//
//  1. Density test of the TDC: NDNL frames whose inputs are chosen so that
//     the comparator's rising edge falls at a uniformly distributed random
//     time within the charging half of the frame. The histogram of rising
//     codes gives the differential non-linearity DNL[c] = n[c]/mean - 1.
//  2. Sine test: NSIN frames of a sine input with K cycles in the record
//     (coherent sampling). Each rising code is turned back into a voltage
//     with the inverse of the ramp (bin centre), and a single-bin DFT gives
//     the signal power; everything else is noise: SNR, then
//     ENOB = (SNR - 1.76)/6.02.
// Every frame's two results are also compared with a scan of the modelled
// comparator level at the sampling instants, as in the lane testbench.
module adc_lane_bench #(
  parameter int RATIO = 8,
  parameter int NDNL  = 8192,
  parameter int NSIN  = 1024,
  parameter int K     = 31
) ();
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;
  import ramp_pkg::*;

  localparam int BIN = BIN_PS, T = 8 * BIN, P = RATIO * T, START = 10000;
  localparam int CODE_W = code_width(RATIO), NB = RATIO * 8, NF = NDNL + NSIN;
  // data-clock periods from the start of a frame to its results at the lane
  // outputs: the decoder publishes RATIO + 4 sampling periods after the frame
  // start, tdc_sync one period later, and the next data-clock edge takes it
  localparam int LAT = (RATIO + 5) / RATIO + 1;

  logic clk, clk45, clk90, clk135, clk_slow, rst;
  logic hit_p, hit_n;
  real  vin;
  logic [CODE_W-1:0] rise_ts, fall_ts;
  logic rise_found, rise_valid, fall_found, fall_valid;

  real vins [NF];
  int  exp_r [NF], exp_f [NF];
  int  code_r [NF];
  int  hist [NB];
  int  checks = 0, failures = 0;
  bit  done = 0;
  real max_dnl = 0.0, snr_db = 0.0, enob = 0.0;

  mmcm_model #(.BIN_PS(BIN), .RATIO(RATIO), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);
  lvds_ramp_model #(.RATIO(RATIO)) u_fe (.vout(clk_slow), .vin, .hit_p, .hit_n);

  adc_lane #(.RATIO(RATIO)) dut (
    .clk, .clk45, .clk90, .clk135, .clk_slow, .rst, .hit_p, .hit_n,
    .rise_ts, .rise_found, .rise_valid, .fall_ts, .fall_found, .fall_valid);

  function automatic bit h_at(int f, int b);
    if (b == 0) return (f == 0) ? level(vins[0], 1, RATIO) : level(vins[f - 1], P, RATIO);
    return level(vins[f], b * BIN, RATIO);
  endfunction

  function automatic real v_of_t(real t);
    return VH - (VH - v_low(RATIO)) * $exp(-t / tau_ps(RATIO));
  endfunction

  initial begin
    automatic real lo = v_low(RATIO), hi = v_high(RATIO);
    automatic real mid = (lo + hi) / 2.0, amp = 0.45 * (hi - lo);
    for (int f = 0; f < NDNL; f++)
      vins[f] = v_of_t(real'(P / 2) * real'($urandom_range(1, 999999)) / 1000000.0);
    for (int f = 0; f < NSIN; f++)
      vins[NDNL + f] = mid + amp * $sin(2.0 * 3.14159265358979 * real'(K) * real'(f) / real'(NSIN));
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

  initial begin
    rst = 1'b1;
    vin = vins[0];
    #(START + 3 * P + T);
    rst = 1'b0;
  end
  always @(negedge clk_slow) begin
    automatic int f = int'(($time - 64'(START)) / 64'(P)) + 1;
    if (f < NF) vin = vins[f];
  end

  // results in data-clock period f+LAT belong to frame f; the first frames are lost to reset
  always @(negedge clk_slow) begin
    automatic int f = int'(($time - 64'(START)) / 64'(P)) - LAT;
    if (!rst && f >= 4 * LAT && f < NF) begin
      checks++;
      if (!rise_valid || !fall_valid || rise_found !== (exp_r[f] >= 0) || fall_found !== (exp_f[f] >= 0) ||
          (rise_found && rise_ts !== CODE_W'(exp_r[f])) || (fall_found && fall_ts !== CODE_W'(exp_f[f]))) begin
        failures++;
        if (failures < 5) $display("RATIO %0d frame %0d: %0d/%0d %0d/%0d expected %0d %0d",
          RATIO, f, rise_found, rise_ts, fall_found, fall_ts, exp_r[f], exp_f[f]);
      end
      code_r[f] = rise_found ? int'(rise_ts) : -1;
    end
  end

  initial begin
    real mean, s, c, ptot, psig, vmean, a;
    int n, lo_c, hi_c;
    #(START + (NF + LAT + 1) * P);
    // density test over codes 1..NB/2 (the charging half)
    foreach (hist[i]) hist[i] = 0;
    n = 0;
    for (int f = 4 * LAT; f < NDNL; f++) if (code_r[f] >= 0) begin hist[code_r[f]]++; n++; end
    lo_c = 1; hi_c = NB / 2;
    mean = real'(n) / real'(hi_c - lo_c + 1);
    for (int i = lo_c; i <= hi_c; i++) begin
      a = real'(hist[i]) / mean - 1.0;
      if (a < 0.0) a = -a;
      if (a > max_dnl) max_dnl = a;
    end
    // sine test on the rising-edge codes
    vmean = 0.0;
    for (int f = 0; f < NSIN; f++)
      vmean += v_of_t((real'(code_r[NDNL + f]) - 0.5) * real'(BIN)) / real'(NSIN);
    s = 0.0; c = 0.0; ptot = 0.0;
    for (int f = 0; f < NSIN; f++) begin
      automatic real v = v_of_t((real'(code_r[NDNL + f]) - 0.5) * real'(BIN)) - vmean;
      automatic real ph = 2.0 * 3.14159265358979 * real'(K) * real'(f) / real'(NSIN);
      s += v * $sin(ph); c += v * $cos(ph); ptot += v * v / real'(NSIN);
    end
    a = 2.0 * $sqrt(s * s + c * c) / real'(NSIN);
    psig = a * a / 2.0;
    snr_db = 10.0 * $log10(psig / (ptot - psig));
    enob = (snr_db - 1.76) / 6.02;
    done = 1;
  end
endmodule
