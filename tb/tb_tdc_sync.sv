// tb_tdc_sync: checks the data synchronisation unit.
// A result with a random timestamp and found flag is strobed in period 4 of
// most frames (the position the decoder uses); some frames carry none. In
// the data-clock domain, out_valid must be high for exactly the data-clock
// period that starts at the next frame boundary, with that result on
// out_ts/out_found, and low in every other period.
module tb_tdc_sync;
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;

  localparam int BIN = 156, T = 8 * BIN, START = 10000;
  localparam int RATIO = 8, NF = 400;
  localparam int CODE_W = code_width(RATIO);

  logic clk, clk45, clk90, clk135, clk_slow;
  logic rst;
  logic [CODE_W-1:0] in_ts, out_ts;
  logic in_found, in_strobe, out_found, out_valid;

  logic [CODE_W-1:0] sent_ts [NF];
  bit   sent_found [NF];
  bit   sent [NF];
  int   checks = 0, failures = 0, delivered = 0, idle = 0;
  int   i = 0, s;

  mmcm_model #(.BIN_PS(BIN), .RATIO(RATIO), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);

  tdc_sync #(.CODE_W(CODE_W), .RATIO(RATIO)) dut (
    .clk, .clk_slow, .rst, .in_ts, .in_found, .in_strobe, .out_ts, .out_found, .out_valid);

  initial begin
    foreach (sent[f]) begin
      sent[f] = ($urandom_range(0, 4) != 0) && f >= 4;
      sent_ts[f] = CODE_W'($urandom);
      sent_found[f] = 1'($urandom);
    end
    rst = 1'b1;
    in_strobe = 1'b0; in_ts = '0; in_found = 1'b0;
    #(START + 2 * RATIO * T + T/2);
    rst = 1'b0;
  end

  // sampling-clock side: strobe during period 4 of frame f
  always @(posedge clk) begin
    automatic int f = i / RATIO;
    in_strobe <= 1'b0;
    if (i % RATIO == 4 && f < NF && sent[f]) begin
      in_strobe <= 1'b1;
      in_ts     <= sent_ts[f];
      in_found  <= sent_found[f];
    end
    i = i + 1;
  end

  // data-clock side: data-clock period s follows frame s-1
  always @(negedge clk_slow) begin
    automatic int f;
    s = int'(($time - 64'(START)) / 64'(RATIO * T));
    f = s - 1;
    if (f >= 4 && f < NF) begin
      checks++;
      if (out_valid !== sent[f]) begin
        failures++;
        if (failures < 10) $display("frame %0d: out_valid=%0d expected %0d", f, out_valid, sent[f]);
      end else if (sent[f]) begin
        delivered++;
        checks++;
        if (out_ts !== sent_ts[f] || out_found !== sent_found[f]) begin
          failures++;
          if (failures < 10) $display("frame %0d: got %0d/%0d expected %0d/%0d",
                                      f, out_ts, out_found, sent_ts[f], sent_found[f]);
        end
      end else idle++;
    end
  end

  initial begin
    #(START + (NF * RATIO + 3 * RATIO) * T);
    checks++;
    if (delivered < NF / 2 || idle == 0) begin
      failures++;
      $display("coverage: delivered=%0d idle=%0d", delivered, idle);
    end
    $display("delivered=%0d idle_frames=%0d", delivered, idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(START + (NF * RATIO + 100) * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
