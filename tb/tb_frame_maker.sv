// tb_frame_maker: self-checking test of the whole frame-maker.
// Timer tick every 4 cycles, rate window of 5 bins of 2 ticks, threshold 8 events per
// window, refractory 30 ticks, hold 20 ticks. Each frame is a burst in which
// a random set of sensor pixels (some in the cropped border, both
// polarities) is replayed over and over, one event every 2 cycles, followed
// by silence. The test checks that active rises and falls once per burst and
// that the frame sent out holds exactly the subsampled, cropped pixels of the
// set in row order with val = 1, followed by EOF.
module tb_frame_maker;
  import hnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] data = 0;
  logic data_v = 0;
  logic active, frame_rdy;
  logic [15:0] rate;
  logic out_valid, out_ready = 0;
  aer_evt_t out_evt;
  int checks = 0, failures = 0, n_eof = 0, n_rise = 0;
  int exp_q [$];
  logic active_q = 0;

  frame_maker #(.SENSOR_W(128), .SUB(4), .CROP(2), .FRAME_W(28), .TICK_DIV(4),
                .BIN_TICKS(2), .N_BINS(5), .TIME_W(32), .RATE_W(16)) dut (
    .clk, .rst_n, .data, .data_v, .threshold(16'd8), .ref_time(32'd30),
    .hold_time(32'd20), .active, .frame_rdy, .rate, .out_valid, .out_ready, .out_evt);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    active_q <= active;
    if (rst_n && active && !active_q) n_rise++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_evt.eof) begin
        n_eof++;
        if (exp_q.size() != 0) begin failures++; $display("EOF with %0d missing", exp_q.size()); end
      end else if (exp_q.size() == 0) begin
        failures++; $display("unexpected pixel %0d,%0d", out_evt.x, out_evt.y);
      end else begin
        if (int'(out_evt.y)*28 + int'(out_evt.x) != exp_q[0] || out_evt.val != 1) begin
          failures++;
          $display("pixel %0d,%0d want %0d", out_evt.x, out_evt.y, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int px [$];
    int py [$];
    bit img [784];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (100) @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      px.delete(); py.delete();
      foreach (img[i]) img[i] = 0;
      for (int n = 0; n < 20 + 15 * f; n++) begin
        int x, y, fx, fy;
        x = $urandom_range(0, 127); y = $urandom_range(0, 127);
        px.push_back(x); py.push_back(y);
        fx = x / 4 - 2; fy = y / 4 - 2;
        if (fx >= 0 && fx < 28 && fy >= 0 && fy < 28) img[fy*28+fx] = 1;
      end
      foreach (img[i]) if (img[i]) exp_q.push_back(i);
      // burst of 8 windows
      for (int c = 0; c < 160; c++) begin
        int k;
        k = c % px.size();
        data   = {1'b0, 7'(py[k]), 7'(px[k]), 1'($urandom)};
        data_v = 1;
        @(negedge clk);
        data_v = 0;
        @(negedge clk);
      end
      // silence, long enough for hold, read-out and refractory
      repeat (1500) @(negedge clk);
      checks++;
      if (n_eof != f + 1 || n_rise != f + 1) begin
        failures++; $display("frame %0d: eof %0d rises %0d", f, n_eof, n_rise);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
