// tb_virtual_sensor_full: the virtual sensor at its default size.
//
// 640 x 480 checkerboard image (0xFF / 0x07), 858 pixel periods per line,
// 525 lines per frame, pclk = clk / 2. Three frames are followed by
// sensor_checker: the first full, the second through a 320 x 240 window at
// (100, 50), the third through a window that does not fit and is therefore
// sent as the full image. Every pixel period is compared with the reference,
// and the line period (2 * 858 clk), frame period (2 * 858 * 525 clk) and
// pixels per line are checked.
module tb_virtual_sensor_full;
  import vsensor_pkg::*;

  localparam int unsigned FRAME_CLK = 2 * OV_H_TOTAL * OV_V_TOTAL;

  logic clk = 0, rst_n = 0;
  window_t win;
  logic repeat_frame;
  logic pclk, href, vsync;
  logic [7:0] data;

  always #5 clk = ~clk;

  virtual_sensor dut (.*);

  int checks, failures, frames, n_windowed, n_fallback, n_repeat, n_advance;
  int n_vsync_periods, n_line_periods;
  sensor_checker #(
    .IMG_W(OV_IMG_W), .IMG_H(OV_IMG_H), .NUM_FRAMES(1), .H_TOTAL(OV_H_TOTAL),
    .V_TOTAL(OV_V_TOTAL), .H_START(OV_H_START), .V_START(OV_V_START),
    .VS_LINES(OV_VS_LINES), .KIND(0)
  ) chk (.*);

  int extra_checks = 0, extra_failures = 0;
  task automatic expect_seen(string what, int count);
    extra_checks++;
    if (count == 0) begin
      extra_failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    win = '{x0: 0, y0: 0, w: 16'(OV_IMG_W), h: 16'(OV_IMG_H)};
    repeat_frame = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (FRAME_CLK / 2) @(posedge clk);
    win = '{x0: 100, y0: 50, w: 320, h: 240};
    repeat (FRAME_CLK) @(posedge clk);
    win = '{x0: 400, y0: 0, w: 320, h: 480};   // 400 + 320 > 640
    repeat (FRAME_CLK) @(posedge clk);
    repeat (FRAME_CLK / 2) @(posedge clk);
    expect_seen("windowing", n_windowed);
    expect_seen("invalid window replaced by full image", n_fallback);
    expect_seen("frame repeat", n_repeat);
    expect_seen("frame period measured", n_vsync_periods);
    expect_seen("line period measured", n_line_periods);
    $display("frames=%0d windowed=%0d fallback=%0d repeat=%0d line_periods=%0d frame_periods=%0d",
             frames, n_windowed, n_fallback, n_repeat, n_line_periods, n_vsync_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures);
    $finish;
  end

  initial begin
    repeat (5 * FRAME_CLK) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures + 1);
    $finish;
  end
endmodule
