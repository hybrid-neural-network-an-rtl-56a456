// tb_workload_mnist: MNIST-style workloads on HybridNet at its default
// timing (1 us tick, 1 ms sliding rate window).
//
// Part 1, synthetic e-MNIST: digit-like images are drawn as random
// thick polylines on a 28x28 grid (about 100 pixels), and each non-zero pixel is sent exactly
// once, in random order, as one sensor event of the default 128x128
// geometry (pixel (x, y) at sensor (4x+8+r, 4y+8+r'), r and r' in 0..3).
// Part 2, a saccade-style stream of a 34x34 sensor (instance with
// SENSOR_W = 34, SUB = 1, CROP = 3): each saccade replays a digit three times
// at small offsets, so pixels repeat and the frame is the union of the
// shifted images; three saccades give three frames through one network.
//
// With threshold 1 the controller becomes Active on the first event, which
// is therefore not stored; the expected frame is built from the remaining
// events. For every frame the test checks the predicted digit against the
// reference model and the frame latency against the per-event budget, and
// prints the average number of events per frame and the time per frame.
module tb_workload_mnist;
  import hnn_pkg::*;
  import tb_hnn_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        sel_n = 0;                 // 0: e-MNIST instance, 1: 34x34 instance
  logic        dvs_req = 0;
  logic [15:0] dvs_data = 0;
  logic        ack_e, ack_n, dvs_ack;
  logic        cfg_we = 0;
  logic [1:0]  cfg_sel = 0;
  logic [8:0]  cfg_addr = 0;
  logic [3:0]  cfg_neuron = 0, cfg_data = 0;
  logic        txr_e, txr_n, txa_e = 0, txa_n = 0;
  logic [15:0] txd_e, txd_n;
  logic        act_e, act_n, rdy_e, rdy_n;
  logic [15:0] rate_e, rate_n;

  int checks = 0, failures = 0;
  int kern [3][25];
  int fcw [432][10];
  logic [15:0] got_e [$];
  logic [15:0] got_n [$];

  assign dvs_ack = sel_n ? ack_n : ack_e;

  always #5 clk = ~clk;

  hybridnet_top dut_e (
    .clk, .rst_n, .dvs_req(dvs_req && !sel_n), .dvs_data, .dvs_ack(ack_e),
    .threshold(16'd1), .ref_time(32'd0), .hold_time(32'd100),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_neuron, .cfg_data,
    .tx_req(txr_e), .tx_data(txd_e), .tx_ack(txa_e),
    .active(act_e), .frame_rdy(rdy_e), .rate(rate_e));

  hybridnet_top #(.SENSOR_W(34), .SUB(1), .CROP(3)) dut_n (
    .clk, .rst_n, .dvs_req(dvs_req && sel_n), .dvs_data, .dvs_ack(ack_n),
    .threshold(16'd1), .ref_time(32'd0), .hold_time(32'd100),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_neuron, .cfg_data,
    .tx_req(txr_n), .tx_data(txd_n), .tx_ack(txa_n),
    .active(act_n), .frame_rdy(rdy_n), .rate(rate_n));

  // result receivers
  initial forever begin
    @(negedge clk);
    if (txr_e && !txa_e) begin
      got_e.push_back(txd_e);
      repeat (2) @(negedge clk);
      txa_e = 1;
      while (txr_e) @(negedge clk);
      txa_e = 0;
    end
  end
  initial forever begin
    @(negedge clk);
    if (txr_n && !txa_n) begin
      got_n.push_back(txd_n);
      repeat (2) @(negedge clk);
      txa_n = 1;
      while (txr_n) @(negedge clk);
      txa_n = 0;
    end
  end

  // frame latency, frame_rdy rising to tx_req rising, on either instance
  longint t_rdy;
  int     np_cur;
  longint lat_sum = 0;
  int     lat_n = 0;
  logic   rdy_q = 0, txr_q = 0;
  always @(posedge clk) if (rst_n) begin
    rdy_q <= sel_n ? rdy_n : rdy_e;
    txr_q <= sel_n ? txr_n : txr_e;
    if ((sel_n ? rdy_n : rdy_e) && !rdy_q) t_rdy = $time;
    if ((sel_n ? txr_n : txr_e) && !txr_q) begin
      longint lat;
      lat = ($time - t_rdy) / 10;
      lat_sum += lat;
      lat_n++;
      checks++;
      if (lat < 30 * np_cur || lat > 30 * np_cur + 784 + 576 + 432 + 10 + 40) begin
        failures++;
        $display("latency %0d cycles for %0d pixels", lat, np_cur);
      end
    end
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dvs_send(input int x, input int y);
    @(negedge clk);
    dvs_data = {1'b0, 7'(y), 7'(x), 1'b1};
    dvs_req  = 1;
    while (!dvs_ack) @(negedge clk);
    dvs_req = 0;
    while (dvs_ack) @(negedge clk);
  endtask

  task automatic cfg_write(input int sel, input int addr, input int neuron, input int val);
    @(negedge clk);
    cfg_we = 1; cfg_sel = 2'(sel); cfg_addr = 9'(addr); cfg_neuron = 4'(neuron);
    cfg_data = 4'(val);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // random digit-like image: a polyline of 4 strokes, 3 pixels thick
  function automatic void draw_digit(output bit img [784]);
    int x0, y0, x1, y1;
    foreach (img[i]) img[i] = 0;
    x0 = $urandom_range(6, 21); y0 = $urandom_range(4, 23);
    for (int s = 0; s < 4; s++) begin
      automatic int n;
      x1 = $urandom_range(6, 21); y1 = $urandom_range(4, 23);
      n = (x1 > x0 ? x1 - x0 : x0 - x1) + (y1 > y0 ? y1 - y0 : y0 - y1) + 1;
      for (int k = 0; k <= n; k++) begin
        automatic int x, y;
        x = x0 + ((x1 - x0) * k) / n;
        y = y0 + ((y1 - y0) * k) / n;
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 3; dx++)
            if (x + dx < 28 && y + dy < 28) img[(y + dy) * 28 + x + dx] = 1;
      end
      x0 = x1; y0 = y1;
    end
  endfunction

  initial begin
    bit digit [784];
    bit frame [784];
    static int n_ev_total = 0;
    static int n_frames = 0;
    logic [15:0] want;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < 25; i++) begin
        kern[c][i] = $urandom_range(0, 7) - 4;
        cfg_write(c, i, 0, kern[c][i]);
      end
    for (int r = 0; r < 432; r++)
      for (int k = 0; k < 10; k++) begin
        fcw[r][k] = $urandom_range(0, 6) - 3;
        cfg_write(3, r, k, fcw[r][k]);
      end
    repeat (700) @(negedge clk);   // let the cores finish clearing

    // part 1: synthetic e-MNIST, one event per non-zero pixel
    sel_n = 0;
    for (int f = 0; f < 8; f++) begin
      draw_digit(digit);
      begin
        automatic int idx [$];
        foreach (digit[i]) if (digit[i]) idx.push_back(i);
        idx.shuffle();
        foreach (frame[i]) frame[i] = 0;
        np_cur = 0;
        for (int e = 0; e < idx.size(); e++) begin
          if (e >= 1) begin frame[idx[e]] = 1; np_cur++; end
          dvs_send((idx[e] % 28) * 4 + 8 + $urandom_range(0, 3),
                   (idx[e] / 28) * 4 + 8 + $urandom_range(0, 3));
        end
        n_ev_total += idx.size();
      end
      want = ref_predict(kern, fcw, frame);
      while (got_e.size() < f + 1) @(negedge clk);
      while (act_e) @(negedge clk);
      repeat (5) @(negedge clk);
      checks++;
      n_frames++;
      if (got_e[f] != want) begin
        failures++;
        $display("e-MNIST frame %0d: result %h want %h", f, got_e[f], want);
      end
    end
    $display("e-MNIST: %0d frames, %0d events per frame on average", n_frames, n_ev_total / n_frames);
    $display("average frame latency %0d cycles (%0d ns at 220 MHz)",
             lat_sum / longint'(lat_n), (lat_sum / longint'(lat_n)) * 1000 / 220);

    // part 2: 34x34 saccades, three offsets per saccade
    sel_n = 1;
    repeat (10) @(negedge clk);
    lat_sum = 0; lat_n = 0;
    for (int f = 0; f < 3; f++) begin
      automatic bit first;
      draw_digit(digit);
      foreach (frame[i]) frame[i] = 0;
      first = 1;
      for (int s = 0; s < 3; s++) begin
        automatic int idx [$];
        foreach (digit[i]) if (digit[i]) idx.push_back(i);
        idx.shuffle();
        foreach (idx[e]) begin
          automatic int x, y, fx, fy;
          x = idx[e] % 28 + s; y = idx[e] / 28 + (s == 1 ? 1 : 0);
          // sensor pixel = frame pixel + CROP (3); the sensor is 34 wide
          fx = x; fy = y;
          if (!first && fx < 28 && fy < 28) frame[fy * 28 + fx] = 1;
          first = 0;
          dvs_send(x + 3, y + 3);
        end
      end
      np_cur = 0;
      foreach (frame[i]) np_cur += int'(frame[i]);
      want = ref_predict(kern, fcw, frame);
      while (got_n.size() < f + 1) @(negedge clk);
      while (act_n) @(negedge clk);
      repeat (5) @(negedge clk);
      checks++;
      if (got_n[f] != want) begin
        failures++;
        $display("saccade frame %0d: result %h want %h", f, got_n[f], want);
      end
    end
    $display("34x34 saccades: 3 frames, average latency %0d cycles", lat_sum / longint'(lat_n));
    checks++;
    if (got_e.size() != 8 || got_n.size() != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
