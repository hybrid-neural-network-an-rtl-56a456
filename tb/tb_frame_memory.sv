// tb_frame_memory: self-checking test of the frame memory with subsampling
// and cropping (128x128 sensor, subsample 4, crop 2, 28x28 frame).
// Random sensor events are written while active is high; the test keeps its
// own 28x28 image built from the mapping x/4-2, y/4-2 (events in the border
// are expected to be dropped), then reads the frame through the read port
// after frame_rdy, clears it, and checks that events outside active, or
// arriving while a frame is pending, change nothing.
module tb_frame_memory;
  logic clk = 0, rst_n = 0;
  logic ev_v = 0, active = 0, clr = 0, done = 0;
  logic [6:0] ev_x = 0, ev_y = 0;
  logic [4:0] rd_x = 0, rd_y = 0;
  logic frame_rdy, busy, rd_bit;
  int checks = 0, failures = 0, dropped = 0;
  bit img [28][28];

  frame_memory #(.SENSOR_W(128), .SUB(4), .CROP(2), .FRAME_W(28)) dut (
    .clk, .rst_n, .ev_v, .ev_x, .ev_y, .active, .frame_rdy, .busy,
    .rd_x, .rd_y, .rd_bit, .clr, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int x, input int y);
    ev_x = 7'(x); ev_y = 7'(y); ev_v = 1;
    @(negedge clk);
    ev_v = 0;
  endtask

  task automatic read_check(input string tag);
    for (int y = 0; y < 28; y++)
      for (int x = 0; x < 28; x++) begin
        rd_x = 5'(x); rd_y = 5'(y); clr = 1;
        #1;
        checks++;
        if (rd_bit != img[y][x]) begin
          failures++;
          if (failures < 10) $display("%s pixel %0d,%0d got %0b", tag, x, y, rd_bit);
        end
        @(negedge clk);
      end
    clr = 0;
    done = 1;
    @(negedge clk);
    done = 0;
  endtask

  initial begin
    int x, y, sx, sy;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (busy) @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      foreach (img[i, j]) img[i][j] = 0;
      // events while non-active are ignored
      repeat (20) send($urandom_range(0, 127), $urandom_range(0, 127));
      active = 1;
      @(negedge clk);
      for (int n = 0; n < 300; n++) begin
        x = $urandom_range(0, 127); y = $urandom_range(0, 127);
        sx = x / 4 - 2; sy = y / 4 - 2;
        if (sx >= 0 && sx < 28 && sy >= 0 && sy < 28) img[sy][sx] = 1;
        else dropped++;
        send(x, y);
      end
      active = 0;
      @(negedge clk);
      checks++;
      if (!frame_rdy) begin failures++; $display("frame_rdy missing"); end
      // a second burst while the frame is pending must be dropped
      active = 1;
      repeat (50) send($urandom_range(0, 127), $urandom_range(0, 127));
      active = 0;
      @(negedge clk);
      read_check("frame");
      checks++;
      if (frame_rdy) begin failures++; $display("frame_rdy stuck"); end
      // memory must be empty after the clearing read
      foreach (img[i, j]) img[i][j] = 0;
      for (int yy = 0; yy < 28; yy++)
        for (int xx = 0; xx < 28; xx++) begin
          rd_x = 5'(xx); rd_y = 5'(yy); #1;
          checks++;
          if (rd_bit) failures++;
        end
    end
    checks++;
    if (dropped == 0) failures++;
    $display("cropped events %0d", dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
