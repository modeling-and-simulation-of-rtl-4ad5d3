// tb_example_frame: the 6 x 5 example frame sent with the full sensor timing.
//
// The virtual sensor is built for a 6 x 5 image read from tb/frame_6x5.hex
// (a 0x07 diagonal on 0xFF, one dead pixel 0x00 at column 4, row 1), with
// the default 858 x 525 timing and pclk = clk / 2. Two frames are received:
// each must bring exactly five href pulses of six pixels, one vsync pulse per
// 2 * 858 * 525 clk, and the pixel values of the file, the same in both
// frames (the frame is repeated).
module tb_example_frame;
  import vsensor_pkg::*;

  localparam int unsigned W = 6, H = 5;
  localparam int unsigned FRAME_CLK = 2 * OV_H_TOTAL * OV_V_TOTAL;

  logic clk = 0, rst_n = 0;
  window_t win;
  logic repeat_frame;
  logic pclk, href, vsync;
  logic [7:0] data;

  always #5 clk = ~clk;

  virtual_sensor #(.IMG_W(W), .IMG_H(H), .INIT_FILE("tb/frame_6x5.hex")) dut (.*);

  function automatic logic [7:0] pix(int x, int y);
    if (x == 4 && y == 1) return 8'h00;
    return (x == y) ? 8'h07 : 8'hFF;
  endfunction

  int checks = 0, failures = 0;
  int cx = 0, cy = 0, frames = 0, pulses = 0;
  longint unsigned cyc = 0, last_vs = 0;
  logic href_q = 0, vs_q = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  always @(posedge clk) cyc++;

  always @(posedge pclk) if (rst_n) begin
    if (vsync && !vs_q) begin
      if (frames > 0) begin
        check(cy == H, $sformatf("frame %0d: %0d href pulses, expected %0d", frames, cy, H));
        check(cyc - last_vs == longint'(FRAME_CLK), $sformatf("frame period %0d clk", cyc - last_vs));
      end
      frames++;
      last_vs = cyc;
      cy = 0;
    end
    if (href) begin
      if (!href_q) begin cx = 0; pulses++; end
      check(cx < W && cy < H && data == pix(cx, cy),
            $sformatf("pixel (%0d,%0d) = %02h", cx, cy, data));
      cx++;
    end else if (href_q) begin
      check(cx == W, $sformatf("line %0d: %0d pixels", cy, cx));
      cy++;
    end
    href_q = href;
    vs_q = vsync;
  end

  initial begin
    win = '{x0: 0, y0: 0, w: 16'(W), h: 16'(H)};
    repeat_frame = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2 * FRAME_CLK + 8) @(posedge clk);
    check(frames == 3, $sformatf("%0d frame starts, expected 3", frames));
    check(pulses == 2 * H, $sformatf("%0d href pulses in two frames", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * FRAME_CLK) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
