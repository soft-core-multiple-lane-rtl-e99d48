// tb_data_out: checks the output stage with 24 lanes.
// Each test frame gives every lane a random rising- and falling-edge result
// (with random found flags). In half of the frames all lanes report in the
// same cycle; in the others each result arrives with its own delay of 0..2
// cycles. The sample must come out exactly one cycle after the last result
// of the frame, with every lane's codes and out_of_range = not (both
// found), and sample_valid must stay low otherwise. At the end one lane
// reports twice within a frame, which must raise `misaligned`.
module tb_data_out;
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;

  localparam int LANES = 24, CODE_W = code_width(DEFAULT_RATIO), NF = 300, T = 10000;

  logic clk_slow = 1'b0, rst;
  logic [LANES-1:0][CODE_W-1:0] rise_ts, fall_ts, rise_code, fall_code;
  logic [LANES-1:0] rise_found, rise_valid, fall_found, fall_valid, out_of_range;
  logic sample_valid, misaligned;

  int checks = 0, failures = 0, staggered = 0, aligned = 0, n_oor = 0;

  data_out #(.LANES(LANES), .CODE_W(CODE_W)) dut (.*);

  always #(T/2) clk_slow = ~clk_slow;

  initial begin
    logic [LANES-1:0][CODE_W-1:0] r_ts, f_ts;
    logic [LANES-1:0] r_f, f_f;
    int dr [LANES], df [LANES];
    int last;
    rst = 1'b1;
    rise_valid = '0; fall_valid = '0; rise_ts = '0; fall_ts = '0; rise_found = '0; fall_found = '0;
    repeat (3) @(posedge clk_slow);
    rst <= 1'b0;
    for (int f = 0; f < NF; f++) begin
      automatic bit stag = f[0];
      for (int l = 0; l < LANES; l++) begin
        r_ts[l] = CODE_W'($urandom); f_ts[l] = CODE_W'($urandom);
        r_f[l] = ($urandom_range(0, 9) != 0); f_f[l] = ($urandom_range(0, 9) != 0);
        dr[l] = stag ? $urandom_range(0, 2) : 0;
        df[l] = stag ? $urandom_range(0, 2) : 0;
      end
      last = 0;
      for (int l = 0; l < LANES; l++) begin
        if (dr[l] > last) last = dr[l];
        if (df[l] > last) last = df[l];
      end
      if (stag) staggered++; else aligned++;
      // drive cycles 0..last, then check
      for (int c = 0; c <= last + 1; c++) begin
        @(posedge clk_slow);
        // what the previous edge registered
        #1;
        checks++;
        if (c <= last && sample_valid) begin
          failures++;
          $display("frame %0d cycle %0d: early sample_valid", f, c);
        end
        if (c == last + 1) begin
          checks++;
          if (!sample_valid) begin
            failures++;
            $display("frame %0d: no sample_valid", f);
          end else begin
            for (int l = 0; l < LANES; l++) begin
              checks++;
              if (rise_code[l] !== r_ts[l] || fall_code[l] !== f_ts[l] ||
                  out_of_range[l] !== !(r_f[l] && f_f[l])) begin
                failures++;
                if (failures < 10) $display("frame %0d lane %0d: %0d %0d %0d expected %0d %0d %0d", f, l,
                  rise_code[l], fall_code[l], out_of_range[l], r_ts[l], f_ts[l], !(r_f[l] && f_f[l]));
              end
              if (out_of_range[l]) n_oor++;
            end
          end
          rise_valid = '0; fall_valid = '0;
        end else begin
          for (int l = 0; l < LANES; l++) begin
            rise_valid[l] = (dr[l] == c);
            fall_valid[l] = (df[l] == c);
            rise_ts[l] = (dr[l] == c) ? r_ts[l] : CODE_W'($urandom);
            fall_ts[l] = (df[l] == c) ? f_ts[l] : CODE_W'($urandom);
            rise_found[l] = (dr[l] == c) ? r_f[l] : 1'($urandom);
            fall_found[l] = (df[l] == c) ? f_f[l] : 1'($urandom);
          end
        end
      end
    end
    checks++;
    if (misaligned) begin failures++; $display("misaligned raised on good traffic"); end
    // lane 3 rising edge reports twice before the frame is complete
    @(posedge clk_slow); #1; rise_valid = 24'h8; fall_valid = '0;
    @(posedge clk_slow); #1; rise_valid = 24'h8;
    @(posedge clk_slow); #1; rise_valid = '0;
    @(posedge clk_slow); #1;
    checks++;
    if (!misaligned) begin failures++; $display("misaligned not raised"); end
    checks++;
    if (staggered == 0 || aligned == 0 || n_oor == 0) begin failures++; $display("coverage gap"); end
    $display("frames aligned=%0d staggered=%0d out_of_range_lanes=%0d", aligned, staggered, n_oor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * (NF * 5 + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
