// tb_tdc_decoder: checks the TDC decode module against a reference scan of
// the hit waveform.
// The hit level is defined bin by bin (one bin = one eighth of a sampling
// period) over many frames: single pulses at random positions, frames with no
// edge, and frames full of random edges. The testbench feeds the 8-BIN code
// of each period three periods late, as the sampling unit does, and uses the
// clock model's frame clock as stop. For every frame the expected result is
// the first bin b of the frame with hit[b] = 1 and hit[b-1] = 0. Each strobe
// must come exactly 4 periods after the frame clock's rising edge that ends
// the frame, and carry that frame's first edge.
module tb_tdc_decoder;
  timeunit 1ps; timeprecision 1ps;
  import adc_pkg::*;

  localparam int BIN = 156, T = 8 * BIN, START = 10000;
  localparam int RATIO = 8, FB = RATIO * 8;   // bins per frame
  localparam int NF = 300;                    // frames
  localparam int CODE_W = code_width(RATIO);

  logic clk, clk45, clk90, clk135, clk_slow;
  logic rst;
  logic [7:0] code;
  logic [CODE_W-1:0] ts;
  logic found, strobe;

  bit   h [NF * FB];
  int   exp_ts [NF];
  bit   exp_found [NF];
  int   checks = 0, failures = 0, results = 0;
  int   n_none = 0, n_frame_edge = 0, n_window_edge = 0;
  int   i = 0;

  mmcm_model #(.BIN_PS(BIN), .RATIO(RATIO), .START_PS(START)) u_clk (.clk, .clk45, .clk90, .clk135, .clk_slow);

  tdc_decoder #(.RATIO(RATIO)) dut (.clk, .rst, .code, .stop(clk_slow), .ts, .found, .strobe);

  function automatic logic [7:0] window(int w);
    logic [7:0] c = '0;
    if (w >= 0 && w < NF * RATIO)
      for (int k = 0; k < 8; k++) c[k] = h[w * 8 + k];
    return c;
  endfunction

  initial begin
    // waveform
    for (int f = 0; f < NF; f++) begin
      automatic int kind = $urandom_range(0, 7);
      automatic int p = $urandom_range(0, FB - 1);
      automatic int q = p + $urandom_range(1, FB);
      for (int b = 0; b < FB; b++) begin
        case (kind)
          0:       h[f*FB + b] = 1'b0;
          1:       h[f*FB + b] = 1'b1;
          2, 3:    h[f*FB + b] = 1'($urandom);
          default: h[f*FB + b] = (b >= p && b < q);
        endcase
      end
    end
    // reference: first rising transition of each frame
    for (int f = 0; f < NF; f++) begin
      exp_found[f] = 0;
      exp_ts[f] = 0;
      for (int b = 0; b < FB; b++) begin
        automatic int g = f * FB + b;
        automatic bit prev = (g == 0) ? 1'b0 : h[g - 1];
        if (h[g] && !prev) begin
          exp_found[f] = 1;
          exp_ts[f] = b;
          break;
        end
      end
    end
  end

  initial begin
    rst = 1'b1;
    code = '0;
    #(START + 16 * T + T/2);
    rst = 1'b0;
  end

  // code of window i-3 during period i (i counts CLK rising edges)
  always @(posedge clk) begin
    code <= window(i - 3);
    i = i + 1;
  end

  // monitor in the middle of each period (period i-1 since the increment)
  always @(negedge clk) begin
    if (!rst && strobe) begin
      automatic int cyc = i - 1;
      automatic int w = cyc - 4;           // window whose frame start released the result
      automatic int f = w / RATIO - 1;
      checks++;
      if (w % RATIO != 0) begin
        failures++;
        if (failures < 5) $display("strobe in period %0d is not 4 periods after a frame start", cyc);
      end else if (f >= 0 && f < NF) begin
        results++;
        checks++;
        if (found !== exp_found[f] || (exp_found[f] && ts !== CODE_W'(exp_ts[f]))) begin
          failures++;
          if (failures < 10)
            $display("frame %0d: found=%0d ts=%0d expected found=%0d ts=%0d",
                     f, found, ts, exp_found[f], exp_ts[f]);
        end
        if (!exp_found[f]) n_none++;
        else if (exp_ts[f] == 0) n_frame_edge++;
        else if (exp_ts[f] % 8 == 0) n_window_edge++;
      end
    end
  end

  initial begin
    #(START + (NF * RATIO + 8) * T);
    checks++;
    if (results < NF - 4) begin
      failures++;
      $display("only %0d results for %0d frames", results, NF);
    end
    checks++;
    if (n_none == 0 || n_window_edge == 0) begin
      failures++;
      $display("cases not covered: none=%0d window_edge=%0d", n_none, n_window_edge);
    end
    $display("results=%0d no_edge=%0d edge_at_frame_start=%0d edge_at_window_start=%0d",
             results, n_none, n_frame_edge, n_window_edge);
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
