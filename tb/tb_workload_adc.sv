// tb_workload_adc: the converter's characterisation runs at the frame
// lengths discussed for it: 8 sampling periods per frame (100 MSa/s, 6-bit
// timestamps, the default), 16 (50 MSa/s, one more bit) and 1 (a ramp at
// the sampling clock itself, 800 MSa/s, 3-bit fine time only). For each it
// runs the TDC density test and the sine test of adc_lane_bench and requires
//   - every frame's results to match the reference scan,
//   - |DNL| below 0.3 LSB on the time codes (ideal clocks, so only the
//     counting statistics of the random hits remain),
//   - at 100 and 50 MSa/s an SNR of at least 24.3 dB (ENOB 3.8 bits), the
//     figure reported for the published converter, and SNR rising as the
//     rate falls from 800 to 100 to 50 MSa/s.
module tb_workload_adc;
  timeunit 1ps; timeprecision 1ps;

  int checks = 0, failures = 0;

  adc_lane_bench #(.RATIO(8))  u_100msps ();
  adc_lane_bench #(.RATIO(16)) u_50msps ();
  adc_lane_bench #(.RATIO(1))  u_800msps ();

  initial begin
    wait (u_100msps.done && u_50msps.done && u_800msps.done);
    checks += u_100msps.checks + u_50msps.checks + u_800msps.checks;
    failures += u_100msps.failures + u_50msps.failures + u_800msps.failures;
    $display("800 MSa/s: max |DNL| %.3f LSB, SNR %.2f dB, ENOB %.2f bits", u_800msps.max_dnl, u_800msps.snr_db, u_800msps.enob);
    $display("100 MSa/s: max |DNL| %.3f LSB, SNR %.2f dB, ENOB %.2f bits", u_100msps.max_dnl, u_100msps.snr_db, u_100msps.enob);
    $display(" 50 MSa/s: max |DNL| %.3f LSB, SNR %.2f dB, ENOB %.2f bits", u_50msps.max_dnl, u_50msps.snr_db, u_50msps.enob);
    checks += 7;
    if (!(u_800msps.max_dnl <= 0.3)) failures++;
    if (!(u_100msps.snr_db > u_800msps.snr_db)) failures++;
    if (!(u_100msps.max_dnl <= 0.3)) failures++;
    if (!(u_50msps.max_dnl <= 0.3)) failures++;
    if (!(u_100msps.snr_db >= 24.3)) failures++;
    if (!(u_50msps.snr_db >= 24.3)) failures++;
    if (!(u_50msps.snr_db > u_100msps.snr_db)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000 + (8192 + 1024 + 100) * 16 * 8 * 156);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
