// tb_virtual_sensor: end-to-end test of the virtual sensor (memory and
// management together) at a reduced size.
//
// The stored image is the 6 x 5 frame size of the example output, two frames
// of the ramp pattern (x + 3y + 7f); a line lasts 16 pixel periods and a frame
// 10 lines. sensor_checker follows every pixel period with its own reference.
// In addition a receiver built here samples data at each pclk rise while href
// is high, as an image processing system would, rebuilds each frame and, at
// the next vsync, compares it pixel by pixel with the window of the stored
// frame that should have been sent.
// Frames: 0-1 full image stepping through both stored frames, 2 a 4 x 3
// window at (1,2), 3 an invalid (empty) window, sent as the full image,
// 4-6 the same stored frame repeated.
module tb_virtual_sensor;
  import vsensor_pkg::*;

  localparam int unsigned IMG_W = 6, IMG_H = 5, NF = 2;
  localparam int unsigned HT = 16, VT = 10, HS = 4, VS0 = 3, VSL = 2;

  logic clk = 0, rst_n = 0;
  window_t win;
  logic repeat_frame;
  logic pclk, href, vsync;
  logic [7:0] data;

  always #5 clk = ~clk;

  virtual_sensor #(
    .DATA_W(8), .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NF),
    .H_TOTAL(HT), .V_TOTAL(VT), .H_START(HS), .V_START(VS0), .VS_LINES(VSL),
    .PATTERN(PATTERN_RAMP)
  ) dut (.*);

  int checks, failures, frames, n_windowed, n_fallback, n_repeat, n_advance;
  int n_vsync_periods, n_line_periods;
  sensor_checker #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NF), .H_TOTAL(HT), .V_TOTAL(VT),
    .H_START(HS), .V_START(VS0), .VS_LINES(VSL), .KIND(1)
  ) chk (.*);

  // Receiver: rebuild the frame from href/data, check it at the next vsync.
  logic [7:0] cap [IMG_H][IMG_W];
  int cx, cy, rx_frames, rx_checks, rx_failures;
  logic href_q, vs_q;
  // what the receiver expects for the frame it is capturing
  int unsigned e_f, e_x0, e_y0, e_w, e_h;
  int unsigned sent_frame;  // stored frame index per frame, known from the stimulus

  initial begin
    cx = 0; cy = 0; rx_frames = 0; rx_checks = 0; rx_failures = 0;
    href_q = 0; vs_q = 0;
  end

  always @(posedge pclk) if (rst_n) begin
    if (vsync && !vs_q) begin
      if (rx_frames > 0) begin
        // compare the captured frame
        rx_checks++;
        if (cy != int'(e_h)) begin
          rx_failures++;
          $display("receiver: frame %0d had %0d lines, expected %0d", rx_frames, cy, e_h);
        end
        for (int y = 0; y < int'(e_h); y++)
          for (int x = 0; x < int'(e_w); x++) begin
            logic [7:0] want;
            want = 8'(int'(e_x0) + x + 3 * (int'(e_y0) + y) + 7 * int'(e_f));
            rx_checks++;
            if (cap[y][x] !== want) begin
              rx_failures++;
              if (rx_failures < 10)
                $display("receiver: frame %0d pixel (%0d,%0d) = %02h, expected %02h",
                         rx_frames, x, y, cap[y][x], want);
            end
          end
      end
      rx_frames++;
      cy = 0;
      // the window and stored frame of the frame now starting
      e_f = sent_frame;
      if (win.w != 0 && win.h != 0 && win.x0 + win.w <= IMG_W && win.y0 + win.h <= IMG_H) begin
        e_x0 = 32'(win.x0); e_y0 = 32'(win.y0); e_w = 32'(win.w); e_h = 32'(win.h);
      end else begin
        e_x0 = 0; e_y0 = 0; e_w = IMG_W; e_h = IMG_H;
      end
    end
    if (href) begin
      if (!href_q) cx = 0;
      if (cy < IMG_H && cx < IMG_W) cap[cy][cx] = data;
      cx++;
    end else if (href_q) begin
      rx_checks++;
      if (cx != int'(e_w)) begin
        rx_failures++;
        $display("receiver: line %0d had %0d pixels, expected %0d", cy, cx, e_w);
      end
      cy++;
    end
    href_q = href;
    vs_q = vsync;
  end

  int extra_checks, extra_failures;
  task automatic expect_seen(string what, int count);
    extra_checks++;
    if (count == 0) begin
      extra_failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    extra_checks = 0; extra_failures = 0;
    win = '{x0: 0, y0: 0, w: 16'(IMG_W), h: 16'(IMG_H)};
    repeat_frame = 0;
    sent_frame = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 7; f++) begin
      repeat (HT * VT) @(posedge clk);   // middle of frame f
      case (f)
        1: win = '{x0: 1, y0: 2, w: 4, h: 3};
        2: win = '{x0: 0, y0: 0, w: 0, h: 3};   // empty: full image
        3: begin
             win = '{x0: 0, y0: 0, w: 16'(IMG_W), h: 16'(IMG_H)};
             repeat_frame = 1;
           end
        default: ;
      endcase
      // stored frame of frame f+1
      if (!repeat_frame) sent_frame = (sent_frame + 1) % NF;
      repeat (HT * VT) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    expect_seen("windowing", n_windowed);
    expect_seen("invalid window replaced by full image", n_fallback);
    expect_seen("frame repeat", n_repeat);
    expect_seen("frame sequence advance", n_advance);
    expect_seen("frame period measured", n_vsync_periods);
    expect_seen("line period measured", n_line_periods);
    expect_seen("frames checked by the receiver", rx_frames - 1);
    $display("frames=%0d windowed=%0d fallback=%0d repeat=%0d advance=%0d received=%0d",
             frames, n_windowed, n_fallback, n_repeat, n_advance, rx_frames - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks + rx_checks,
             failures + extra_failures + rx_failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks + rx_checks,
             failures + extra_failures + rx_failures + 1);
    $finish;
  end
endmodule
