// vsensor_pkg: types and constants shared by the virtual image sensor.
//
// The numbers are those of the OV7620 sensor that the virtual sensor imitates:
// a pixel clock of half the master clock, 858 pixel periods per line,
// 525 lines per frame and a 640 x 480 array of 8-bit pixels. The placement of
// the active area inside a line and a frame, and the length of the VSYNC
// pulse, are this design's own choices (no numbers are given for them).
// window_t is the read-out window ("windowing"): the part of the stored image
// that is sent, given by its top-left corner and its size in pixels.
package vsensor_pkg;

  // Timing and geometry of the imitated sensor. PCLK is CLK/2, which the
  // management block builds in.
  localparam int unsigned OV_DATA_W      = 8;
  localparam int unsigned OV_IMG_W       = 640;
  localparam int unsigned OV_IMG_H       = 480;
  localparam int unsigned OV_H_TOTAL     = 858;  // pixel periods per line
  localparam int unsigned OV_V_TOTAL     = 525;  // lines per frame

  // Own choices: where the active pixels sit in a line and in a frame.
  localparam int unsigned OV_H_START   = 128;  // first pixel period with HREF high
  localparam int unsigned OV_V_START   = 20;   // first line that carries pixels
  localparam int unsigned OV_VS_LINES  = 4;    // VSYNC length in lines

  // Built-in image patterns of the frame memory.
  localparam int unsigned PATTERN_CHECKER = 0;  // 0xFF / 0x07 checkerboard
  localparam int unsigned PATTERN_RAMP    = 1;  // (x + 3y + 7f) mod 256

  typedef logic [15:0] coord_t;

  typedef struct packed {
    coord_t x0;  // first column of the window in the stored image
    coord_t y0;  // first row of the window
    coord_t w;   // columns sent per line
    coord_t h;   // lines sent per frame
  } window_t;

endpackage
