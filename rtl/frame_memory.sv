// frame_memory: the image store of the virtual sensor.
//
// An array of NUM_FRAMES frames of IMG_W x IMG_H pixels, each DATA_W bits, one
// word per pixel in raster order: address = f*IMG_W*IMG_H + y*IMG_W + x. As in
// the sensor model it is filled before operation and never written: from the
// hex file INIT_FILE (one pixel per word, path relative to the simulator's
// working directory) when that is given, otherwise from a built-in pattern:
//   PATTERN_CHECKER: 8'hFF where (x + y + f) is even, 8'h07 where it is odd
//                    (the two intensities of the 6 x 5 example frame);
//   PATTERN_RAMP:    (x + 3*y + 7*f) mod 2**DATA_W.
// Filling at build time follows the model; the hex file option and the two
// patterns are this design's choices.
//
// Interface and timing: a synchronous read port. rd_data shows the word at
// the rd_addr sampled on the previous rising clk edge (one cycle latency), so
// it maps onto an FPGA block RAM with an initialisation file.
module frame_memory #(
  parameter int unsigned DATA_W     = vsensor_pkg::OV_DATA_W,
  parameter int unsigned IMG_W      = vsensor_pkg::OV_IMG_W,
  parameter int unsigned IMG_H      = vsensor_pkg::OV_IMG_H,
  parameter int unsigned NUM_FRAMES = 1,
  parameter int unsigned PATTERN    = vsensor_pkg::PATTERN_CHECKER,
  parameter string       INIT_FILE  = "",
  localparam int unsigned DEPTH     = NUM_FRAMES * IMG_W * IMG_H,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int unsigned f = 0; f < NUM_FRAMES; f++)
        for (int unsigned y = 0; y < IMG_H; y++)
          for (int unsigned x = 0; x < IMG_W; x++) begin
            if (PATTERN == vsensor_pkg::PATTERN_RAMP)
              mem[(f * IMG_H + y) * IMG_W + x] = DATA_W'(x + 3 * y + 7 * f);
            else
              mem[(f * IMG_H + y) * IMG_W + x] = (((x + y + f) % 2) == 0) ? {DATA_W{1'b1}} : DATA_W'(7);
          end
    end
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end

endmodule
