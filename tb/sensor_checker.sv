// sensor_checker: reference model and monitor for the virtual sensor's output.
//
// Watches pclk/href/vsync/data and compares them, at every pclk rising edge,
// with the values worked out here from the pixel count since reset: the
// position in line and frame, whether it lies in the window, and the pixel
// value from the known image formula (KIND 0: 0xFF/0x07 checkerboard,
// 1: ramp x + 3y + 7f, 2: (address * 37 + 5) mod 256). The first pixel tick
// after reset is position 0 of frame 0, sampled at the second pclk rise.
// It also checks the clock ratio (pclk period 2 clk), the line period
// (H_TOTAL pixel periods, from href rise to href rise) and the frame period
// (V_TOTAL lines, from vsync rise to vsync rise), the number of href pixels
// per line, and counts how often windowing, window fallback, frame repeat
// and frame sequencing took place.
module sensor_checker #(
  parameter int unsigned IMG_W      = 6,
  parameter int unsigned IMG_H      = 5,
  parameter int unsigned NUM_FRAMES = 1,
  parameter int unsigned H_TOTAL    = 12,
  parameter int unsigned V_TOTAL    = 10,
  parameter int unsigned H_START    = 3,
  parameter int unsigned V_START    = 3,
  parameter int unsigned VS_LINES   = 2,
  parameter int unsigned KIND       = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pclk,
  input  logic                  href,
  input  logic                  vsync,
  input  logic [7:0]            data,
  input  vsensor_pkg::window_t  win,
  input  logic                  repeat_frame,
  output int                    checks,
  output int                    failures,
  output int                    frames,
  output int                    n_windowed,
  output int                    n_fallback,
  output int                    n_repeat,
  output int                    n_advance,
  output int                    n_vsync_periods,
  output int                    n_line_periods
);

  function automatic logic [7:0] pixel(int unsigned addr, int unsigned x,
                                       int unsigned y, int unsigned f);
    case (KIND)
      0:       return (((x + y + f) & 1) == 0) ? 8'hFF : 8'h07;
      1:       return 8'(x + 3 * y + 7 * f);
      default: return 8'(addr * 37 + 5);
    endcase
  endfunction

  longint unsigned cyc, last_rise_cyc, last_vs_cyc, last_href_cyc;
  longint unsigned n;
  int unsigned sf, wx0, wy0, ww, wh, line_href;
  logic [7:0] last_data;
  logic vs_q, href_q;

  initial begin
    checks = 0; failures = 0; frames = 0; n_windowed = 0; n_fallback = 0;
    n_repeat = 0; n_advance = 0; n_vsync_periods = 0; n_line_periods = 0;
    cyc = 0; n = 0; sf = 0; last_data = '0; vs_q = 0; href_q = 0;
    last_rise_cyc = 0; last_vs_cyc = 0; last_href_cyc = 0; line_href = 0;
    wx0 = 0; wy0 = 0; ww = IMG_W; wh = IMG_H;
  end

  always @(posedge clk) if (rst_n) cyc++;

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("sensor_checker: %s at cycle %0d", what, cyc);
  endtask

  always @(posedge pclk) if (rst_n) begin
    longint unsigned k;
    int unsigned col, line, fno;
    logic exp_href, exp_vs;
    logic [7:0] exp_data;
    n++;
    // pclk must rise every second clk
    if (n > 1) begin
      checks++;
      if (cyc - last_rise_cyc != 2) fail("pclk period is not 2 clk");
    end
    last_rise_cyc = cyc;
    if (n >= 2) begin
      k    = n - 2;
      col  = 32'(k % longint'(H_TOTAL));
      line = 32'((k / longint'(H_TOTAL)) % longint'(V_TOTAL));
      fno  = 32'(k / longint'(H_TOTAL * V_TOTAL));
      if (col == 0 && line == 0) begin
        frames++;
        if (fno > 0) begin
          if (repeat_frame) n_repeat++;
          else begin
            sf = (sf + 1) % NUM_FRAMES;
            n_advance++;
          end
        end
        if (win.w != 0 && win.h != 0 && int'(win.x0) + int'(win.w) <= IMG_W &&
            int'(win.y0) + int'(win.h) <= IMG_H) begin
          wx0 = 32'(win.x0); wy0 = 32'(win.y0); ww = 32'(win.w); wh = 32'(win.h);
          if (ww != IMG_W || wh != IMG_H) n_windowed++;
        end else begin
          wx0 = 0; wy0 = 0; ww = IMG_W; wh = IMG_H;
          n_fallback++;
        end
      end
      exp_vs   = (line < VS_LINES);
      exp_href = (line >= V_START) && (line < V_START + wh) &&
                 (col >= H_START) && (col < H_START + ww);
      if (exp_href) begin
        int unsigned x, y, a;
        x = wx0 + col - H_START;
        y = wy0 + line - V_START;
        a = (sf * IMG_H + y) * IMG_W + x;
        exp_data = pixel(a, x, y, sf);
        last_data = exp_data;
      end else begin
        exp_data = last_data;
      end
      checks++;
      if (href !== exp_href || vsync !== exp_vs || data !== exp_data)
        fail($sformatf("frame %0d line %0d col %0d: got href=%0b vsync=%0b data=%02h, want %0b %0b %02h",
                       fno, line, col, href, vsync, data, exp_href, exp_vs, exp_data));
      // href pixels per line
      if (href) line_href++;
      if (col == H_TOTAL - 1) begin
        checks++;
        if (line_href != ((line >= V_START && line < V_START + wh) ? ww : 0))
          fail($sformatf("line %0d carried %0d pixels", line, line_href));
        line_href = 0;
      end
      // line period: href rise to href rise within a frame
      if (href && !href_q) begin
        if (line > V_START) begin
          checks++;
          n_line_periods++;
          if (cyc - last_href_cyc != longint'(2 * H_TOTAL)) fail("line period wrong");
        end
        last_href_cyc = cyc;
      end
      // frame period: vsync rise to vsync rise
      if (vsync && !vs_q) begin
        if (fno > 0) begin
          checks++;
          n_vsync_periods++;
          if (cyc - last_vs_cyc != longint'(2 * H_TOTAL * V_TOTAL)) fail("frame period wrong");
        end
        last_vs_cyc = cyc;
      end
      href_q = href;
      vs_q   = vsync;
    end
  end

endmodule
