// sensor_management: the control block of the virtual image sensor.
//
// It turns the master clock into the signals of a CMOS image sensor of the
// OV7620 kind and feeds them with pixels read from the frame memory:
//   pclk   pixel clock, CLK divided by 2 (PCLK = 2 CLK periods);
//   href   high while the pixels of a line are on the data bus;
//   vsync  frame pulse, high for the first VS_LINES lines of every frame
//          (that is, right after the end of the previous frame);
//   data   pixel intensity, DATA_W bits.
// A line lasts H_TOTAL pixel periods and a frame V_TOTAL lines, whatever the
// image size; both counts and the divide-by-2 follow the imitated sensor.
//
// How it works: a phase bit divides clk by two and is the pclk output. On the
// clk edge on which pclk falls (a "pixel tick") the column and line counters
// step to the next pixel position and href, vsync and data are updated
// together, so they are stable at the following pclk rising edge, where a
// receiver samples them. The counters point at the pixel being sent; the
// memory address of the next position is formed from them combinationally
// and held for the whole pixel period, so a memory with one clk of read
// latency has its word ready at the next tick.
//
// Windowing: only a window {x0, y0, w, h} of the stored image is sent. Its
// pixels fill line periods V_START .. V_START+h-1 from pixel period H_START
// on; href is low elsewhere, and data keeps the last pixel sent. The window
// is sampled at the start of every frame; one that does not fit the image or
// the line and frame periods (or is empty) is replaced by the full image.
// Frame sequencing: with repeat_frame high the same stored frame is sent
// again and again; with it low the frames 0 .. NUM_FRAMES-1 are sent in turn.
// The active-area placement, the VSYNC length, the window sampling and
// fallback, data holding and the reset state are this design's choices.
//
// Reset (rst_n low, asynchronous) stops the outputs low, with data 0; the
// first pixel tick after reset starts frame 0 at line 0.
module sensor_management
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
  localparam int unsigned DEPTH     = NUM_FRAMES * IMG_W * IMG_H,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  window_t           win,
  input  logic              repeat_frame,
  // frame memory read port (one clk latency)
  output logic [AW-1:0]     mem_addr,
  input  logic [DATA_W-1:0] mem_data,
  // sensor outputs
  output logic              pclk,
  output logic              href,
  output logic              vsync,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);
  localparam int unsigned FW = (NUM_FRAMES > 1) ? $clog2(NUM_FRAMES) : 1;

  // The active area must fit in the line and frame periods, after VSYNC.
  initial begin
    assert (H_START + IMG_W <= H_TOTAL && H_START > 0)
      else $error("image lines do not fit in H_TOTAL");
    assert (V_START + IMG_H <= V_TOTAL && V_START >= VS_LINES && VS_LINES > 0)
      else $error("image rows do not fit in V_TOTAL after VSYNC");
  end

  logic          ph;        // clk phase; equals pclk
  logic [HW-1:0] hcnt;      // pixel period within the line
  logic [VW-1:0] vcnt;      // line within the frame
  logic [FW-1:0] fidx;      // stored frame being sent
  logic          started;   // a frame has begun since reset
  window_t       wcur;      // window of the current frame

  // Next pixel position.
  logic          tick;
  logic          h_last, v_last;
  logic [HW-1:0] hn;
  logic [VW-1:0] vn;
  logic          frame_start;

  assign tick   = ph;  // pclk is high, so this edge brings it low
  assign h_last = (hcnt == HW'(H_TOTAL - 1));
  assign v_last = (vcnt == VW'(V_TOTAL - 1));
  assign hn     = h_last ? '0 : hcnt + 1'b1;
  assign vn     = h_last ? (v_last ? '0 : vcnt + 1'b1) : vcnt;
  assign frame_start = h_last && v_last;

  // Window requested for the next frame, checked against the limits.
  window_t win_ok;
  always_comb begin
    if (win.w != 0 && win.h != 0 &&
        32'(win.x0) + 32'(win.w) <= IMG_W &&
        32'(win.y0) + 32'(win.h) <= IMG_H)
      win_ok = win;
    else
      win_ok = '{x0: '0, y0: '0, w: coord_t'(IMG_W), h: coord_t'(IMG_H)};
  end

  // Is the next position inside the window, and where is it in memory?
  logic        act_n;
  logic [31:0] col_n, row_n;
  always_comb begin
    col_n = 32'(hn) - H_START;
    row_n = 32'(vn) - V_START;
    act_n = (32'(hn) >= H_START) && (col_n < 32'(wcur.w)) &&
            (32'(vn) >= V_START) && (row_n < 32'(wcur.h));
    if (act_n)
      mem_addr = AW'((32'(fidx) * IMG_H + 32'(wcur.y0) + row_n) * IMG_W
                     + 32'(wcur.x0) + col_n);
    else
      mem_addr = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph      <= 1'b0;
      hcnt    <= HW'(H_TOTAL - 1);
      vcnt    <= VW'(V_TOTAL - 1);
      fidx    <= '0;
      started <= 1'b0;
      wcur    <= '{x0: '0, y0: '0, w: coord_t'(IMG_W), h: coord_t'(IMG_H)};
      href    <= 1'b0;
      vsync   <= 1'b0;
      data    <= '0;
    end else begin
      ph <= ~ph;
      if (tick) begin
        hcnt  <= hn;
        vcnt  <= vn;
        href  <= act_n;
        vsync <= (32'(vn) < VS_LINES);
        if (act_n) data <= mem_data;
        if (frame_start) begin
          // The window is used from the first active line on, and
          // V_START >= VS_LINES > 0, so taking it here is in time.
          wcur    <= win_ok;
          started <= 1'b1;
          if (started && !repeat_frame)
            fidx <= (32'(fidx) == NUM_FRAMES - 1) ? '0 : fidx + 1'b1;
        end
      end
    end
  end

  assign pclk = ph;

  // Bus rules: pixel data only outside the frame pulse, and the outputs
  // change only when pclk falls.
  a_href_not_in_vsync : assert property (@(posedge clk) disable iff (!rst_n)
    !(href && vsync));
  a_outputs_on_fall : assert property (@(posedge clk) disable iff (!rst_n)
    !ph |=> $stable({href, vsync, data}));

endmodule
