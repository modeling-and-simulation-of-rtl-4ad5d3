// tb_frame_memory: self-checking test of the frame memory.
//
// Three instances: the checkerboard pattern and the ramp pattern, each with
// two stored 6 x 5 frames, and one read from the 6 x 5 example image file
// tb/frame_6x5.hex (a 0x07 diagonal on 0xFF with one dead 0x00 pixel at
// column 4, row 1). Every address is read in order and then 200 random
// addresses; each word is compared, one clk after its address, with the
// value computed here from the pattern formula or the image rule. A word
// that arrives in the same cycle as its address counts as a failure too.
module tb_frame_memory;
  import vsensor_pkg::*;

  localparam int unsigned W = 6, H = 5, NF = 2;
  localparam int unsigned DEPTH = NF * W * H;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned AW1 = $clog2(W * H);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [AW-1:0]  addr;
  logic [AW1-1:0] addr1;
  logic [7:0] q_chk, q_ramp, q_file;

  frame_memory #(.DATA_W(8), .IMG_W(W), .IMG_H(H), .NUM_FRAMES(NF),
                 .PATTERN(PATTERN_CHECKER)) u_chk (.clk, .rd_addr(addr), .rd_data(q_chk));
  frame_memory #(.DATA_W(8), .IMG_W(W), .IMG_H(H), .NUM_FRAMES(NF),
                 .PATTERN(PATTERN_RAMP)) u_ramp (.clk, .rd_addr(addr), .rd_data(q_ramp));
  frame_memory #(.DATA_W(8), .IMG_W(W), .IMG_H(H), .NUM_FRAMES(1),
                 .INIT_FILE("tb/frame_6x5.hex")) u_file (.clk, .rd_addr(addr1), .rd_data(q_file));

  int checks = 0, failures = 0;

  function automatic logic [7:0] exp_chk(int unsigned a);
    int unsigned f, y, x;
    f = a / (W * H); y = (a / W) % H; x = a % W;
    return ((x + y + f) % 2 == 0) ? 8'hFF : 8'h07;
  endfunction
  function automatic logic [7:0] exp_ramp(int unsigned a);
    int unsigned f, y, x;
    f = a / (W * H); y = (a / W) % H; x = a % W;
    return 8'(x + 3 * y + 7 * f);
  endfunction
  function automatic logic [7:0] exp_file(int unsigned a);
    int unsigned y, x;
    y = a / W; x = a % W;
    if (x == 4 && y == 1) return 8'h00;
    return (x == y) ? 8'h07 : 8'hFF;
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] want, int unsigned a);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("%s: address %0d read %02h, expected %02h", what, a, got, want);
    end
  endtask

  task automatic read_one(int unsigned a);
    @(negedge clk);
    addr  = AW'(a);
    addr1 = AW1'(a % (W * H));
    #1;
    @(posedge clk); #1;
    check("checker", q_chk, exp_chk(a), a);
    check("ramp", q_ramp, exp_ramp(a), a);
    check("file", q_file, exp_file(a % (W * H)), a % (W * H));
  endtask

  initial begin
    addr = '0; addr1 = '0;
    for (int unsigned a = 0; a < DEPTH; a++) read_one(a);
    repeat (200) read_one($urandom_range(DEPTH - 1));
    // latency: change the address and look before the next clock edge
    for (int unsigned a = 1; a < W; a++) begin
      @(negedge clk);
      addr = AW'(a - 1);
      @(posedge clk); #1;
      @(negedge clk);
      addr = AW'(a);
      #1;
      checks++;
      if (q_ramp !== exp_ramp(a - 1)) begin
        failures++;
        $display("ramp: read data changed before the clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
