// virtual_sensor: a virtual CMOS image sensor, the top of the design.
//
// It stands in for a real OV7620-type image sensor in front of an image
// processing system, on an FPGA or in simulation, and sends a stored image
// with the same signals: pclk (CLK/2), href, vsync and 8-bit data, 858 pixel
// periods per line and 525 lines per frame by default. Unlike a real sensor
// it sends exactly the same frame as often as wanted, or a fixed sequence of
// stored frames, and its image is fully known in advance.
//
// Two blocks, as in the model it follows: frame_memory holds the image(s),
// initialised at build time; sensor_management counts pixels and lines,
// generates the synchronisation signals, reads the pixels of the selected
// window from memory and puts them on the data bus. See those two files for
// the timing. win selects the part of the image that is sent (windowing) and
// is sampled at the start of each frame; repeat_frame chooses between
// repeating the current stored frame and stepping through all NUM_FRAMES.
module virtual_sensor
  import vsensor_pkg::*;
#(
  parameter int unsigned DATA_W     = OV_DATA_W,
  parameter int unsigned IMG_W      = OV_IMG_W,
  parameter int unsigned IMG_H      = OV_IMG_H,
  parameter int unsigned NUM_FRAMES = 1,
  parameter int unsigned H_TOTAL    = OV_H_TOTAL,
  parameter int unsigned V_TOTAL    = OV_V_TOTAL,
  parameter int unsigned H_START    = OV_H_START,
  parameter int unsigned V_START    = OV_V_START,
  parameter int unsigned VS_LINES   = OV_VS_LINES,
  parameter int unsigned PATTERN    = PATTERN_CHECKER,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clk,
  input  logic              rst_n,
  input  window_t           win,
  input  logic              repeat_frame,
  output logic              pclk,
  output logic              href,
  output logic              vsync,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = NUM_FRAMES * IMG_W * IMG_H;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0]     mem_addr;
  logic [DATA_W-1:0] mem_data;

  frame_memory #(
    .DATA_W(DATA_W), .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NUM_FRAMES),
    .PATTERN(PATTERN), .INIT_FILE(INIT_FILE)
  ) u_memory (
    .clk    (clk),
    .rd_addr(mem_addr),
    .rd_data(mem_data)
  );

  sensor_management #(
    .DATA_W(DATA_W), .IMG_W(IMG_W), .IMG_H(IMG_H), .NUM_FRAMES(NUM_FRAMES),
    .H_TOTAL(H_TOTAL), .V_TOTAL(V_TOTAL), .H_START(H_START),
    .V_START(V_START), .VS_LINES(VS_LINES)
  ) u_management (
    .clk         (clk),
    .rst_n       (rst_n),
    .win         (win),
    .repeat_frame(repeat_frame),
    .mem_addr    (mem_addr),
    .mem_data    (mem_data),
    .pclk        (pclk),
    .href        (href),
    .vsync       (vsync),
    .data        (data)
  );

endmodule
