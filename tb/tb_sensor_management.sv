// tb_sensor_management: self-checking test of the management block alone.
//
// A 6 x 5 image (the size of the example frame), two stored frames, a line
// of 12 pixel periods and a frame of 10 lines. The frame memory is modelled
// here: one clk of read latency, word = (address * 37 + 5) mod 256, so every
// pixel of both frames has its own value and a wrong address shows. The
// window and repeat_frame are changed in the middle of frames, and
// sensor_checker compares every pixel period with its own reference.
// Frames: 0-1 full image stepping through both stored frames, 2 a 3 x 2
// window at (2,1), 3 a 1 x 5 column at (5,0), 4 an invalid window (full
// image), 5-6 repeat of the same stored frame with a 6 x 1 window.
module tb_sensor_management;
  import vsensor_pkg::*;

  localparam int unsigned IMG_W = 6, IMG_H = 5, NF = 2;
  localparam int unsigned HT = 12, VT = 10, HS = 3, VS0 = 3, VSL = 2;
  localparam int unsigned DEPTH = NF * IMG_W * IMG_H;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  window_t win;
  logic repeat_frame;
  logic [AW-1:0] mem_addr;
  logic [7:0] mem_data;
  logic pclk, href, vsync;
  logic [7:0] data;

  always #5 clk = ~clk;

  sensor_management #(
    .DATA_W(8), .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NF),
    .H_TOTAL(HT), .V_TOTAL(VT), .H_START(HS), .V_START(VS0), .VS_LINES(VSL)
  ) dut (.*);

  // memory model
  always_ff @(posedge clk) mem_data <= 8'(int'(mem_addr) * 37 + 5);

  int checks, failures, frames, n_windowed, n_fallback, n_repeat, n_advance;
  int n_vsync_periods, n_line_periods;
  sensor_checker #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NF), .H_TOTAL(HT), .V_TOTAL(VT),
    .H_START(HS), .V_START(VS0), .VS_LINES(VSL), .KIND(2)
  ) chk (.*);

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    // change inputs in the middle of each frame, for the next one
    for (int f = 0; f < 7; f++) begin
      repeat (HT * VT) @(posedge clk);   // half a frame in
      case (f)
        1: win = '{x0: 2, y0: 1, w: 3, h: 2};
        2: win = '{x0: 5, y0: 0, w: 1, h: 5};
        3: win = '{x0: 4, y0: 0, w: 5, h: 5};   // does not fit: full image
        4: begin win = '{x0: 0, y0: 3, w: 6, h: 1}; repeat_frame = 1; end
        default: ;
      endcase
      repeat (HT * VT) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    expect_seen("windowing", n_windowed);
    expect_seen("invalid window replaced by full image", n_fallback);
    expect_seen("frame repeat", n_repeat);
    expect_seen("frame sequence advance", n_advance);
    expect_seen("frame period measured", n_vsync_periods);
    expect_seen("line period measured", n_line_periods);
    extra_checks++;
    // seven whole frames, and the eighth has just begun
    if (frames != 8) begin
      extra_failures++;
      $display("saw %0d frames, expected 8", frames);
    end
    $display("frames=%0d windowed=%0d fallback=%0d repeat=%0d advance=%0d",
             frames, n_windowed, n_fallback, n_repeat, n_advance);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks,
             failures + extra_failures + 1);
    $finish;
  end
endmodule
