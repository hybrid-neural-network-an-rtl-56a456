// tb_hnn_body.svh: shared body of the end-to-end HybridNet testbenches.
//
// The including module declares the test settings (T_THR, T_REF, T_HOLD,
// T_FRAMES, T_BURST, T_GAP, T_START, T_WATCHDOG, T_EXPECT_REF, T_PAUSE) and then
// instantiates hybridnet_top as dut on the signals below.
//
// The test plays the sensor (4-phase AER sender) and the USB-AER receiver.
// It loads random kernels and fully connected weights, then for each frame
// picks a random set of sensor pixels (some in the cropped border) and
// replays it as a burst of events, followed by a gap of silence. From the
// 28x28 frame that the subsampling and cropping of the set give, it
// computes the expected prediction with the reference layer arithmetic
// (convolution, max pooling, fully connected sum, first maximum) and
// compares it with the word the design sends. It also counts the design's
// mechanisms (frames made, refractory blocking, cropped events, back-pressure
// from the convolution cores, arbitration between cores, neurons fired in
// each layer, EOF commands, results with and without a winner) and fails if
// one it must see never happened. With T_PAUSE > 0 the sensor falls silent
// for T_PAUSE cycles right after Active rises, so that the rate drops below
// the threshold inside the hold time and the controller must stay Active.

import hnn_pkg::*;
import tb_hnn_ref_pkg::*;

logic        clk = 0, rst_n = 0;
logic        dvs_req = 0, dvs_ack;
logic [15:0] dvs_data = 0;
logic        cfg_we = 0;
logic [1:0]  cfg_sel = 0;
logic [8:0]  cfg_addr = 0;
logic [3:0]  cfg_neuron = 0, cfg_data = 0;
logic        tx_req, tx_ack = 0;
logic [15:0] tx_data;
logic        active, frame_rdy;
logic [15:0] rate;

int checks = 0, failures = 0;
int kern [3][25];
int fcw [432][10];
logic [15:0] got_q [$];
logic [15:0] exp_q [$];

// mechanism counters
int n_frames = 0, n_ref_block = 0, n_cropped = 0, n_conv_stall = 0,
    n_pool_contend = 0, n_conv_fire = 0, n_pool_fire = 0, n_fc_fire = 0,
    n_eof_conv = 0, n_results = 0, n_winner = 0, n_hold_block = 0;
logic active_q = 0;

// frame latency: frame_rdy rising to the result's tx_req rising, against the
// budget 30 cycles per set pixel in the cores, plus the 784-pixel read-out,
// the 576-neuron core scan, the 432-unit pool scan and the 10-neuron scan
// (the read-out and the pool scan overlap other work, so this is an upper
// bound), and at least 30 cycles per set pixel
int  npix_q [$];
longint t_rdy_q [$];
logic frame_rdy_q = 0, tx_req_q = 0;
int  n_lat_checked = 0;
longint lat_max = 0;
always @(posedge clk) if (rst_n) begin
  frame_rdy_q <= frame_rdy;
  tx_req_q    <= tx_req;
  if (frame_rdy && !frame_rdy_q) t_rdy_q.push_back($time);
  if (tx_req && !tx_req_q && t_rdy_q.size() > 0 && npix_q.size() > 0) begin
    longint lat;
    int np;
    lat = ($time - t_rdy_q.pop_front()) / 10;
    np  = npix_q.pop_front();
    checks++;
    n_lat_checked++;
    if (lat > lat_max) lat_max = lat;
    if (lat < 30 * np || lat > 30 * np + 784 + 576 + 432 + 10 + 40) begin
      failures++;
      $display("frame latency %0d cycles for %0d pixels", lat, np);
    end
  end
end

always #5 clk = ~clk;

always @(posedge clk) if (rst_n) begin
  active_q <= active;
  if (active && !active_q) n_frames++;
  if (!dut.u_fm.u_ctrl.active && dut.u_fm.u_ctrl.c1 && !dut.u_fm.u_ctrl.c2) n_ref_block++;
  if (dut.u_fm.u_ctrl.active && dut.u_fm.u_ctrl.c3 && !dut.u_fm.u_ctrl.c4) n_hold_block++;
  if (dut.fm_valid && !dut.fm_ready) n_conv_stall++;
  if ($countones(dut.cv_out_valid) > 1) n_pool_contend++;
  for (int c = 0; c < 3; c++)
    if (dut.cv_out_valid[c] && dut.cv_out_ready[c]) begin
      if (dut.cv_out_evt[c].eof) n_eof_conv++;
      else n_conv_fire++;
    end
  if (dut.sp_valid && dut.sp_ready && !dut.sp_evt.eof) n_pool_fire++;
  if (dut.fc_valid && dut.fc_ready && !dut.fc_evt.eof) n_fc_fire++;
end

// USB-AER side: 4-phase receiver
initial begin
  forever begin
    @(negedge clk);
    if (tx_req && !tx_ack) begin
      got_q.push_back(tx_data);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      tx_ack = 1;
      while (tx_req) @(negedge clk);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      tx_ack = 0;
    end
  end
end

initial begin
  repeat (T_WATCHDOG) @(posedge clk);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

task automatic dvs_send(input int x, input int y, input bit pol);
  @(negedge clk);
  dvs_data = {1'b0, 7'(y), 7'(x), pol};
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

// expected output word for a binary 28x28 frame
function automatic logic [15:0] predict(input bit img [784]);
  return ref_predict(kern, fcw, img);
endfunction

initial begin
  int px [$];
  int py [$];
  bit img [784];
  repeat (3) @(negedge clk);
  rst_n = 1;
  // random weights: kernels -4..3, fully connected -3..3
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
  repeat (T_START) @(negedge clk);
  for (int f = 0; f < T_FRAMES; f++) begin
    int npix;
    px.delete(); py.delete();
    foreach (img[i]) img[i] = 0;
    // frame 1 lies wholly in the cropped border: an empty frame, no winner
    npix = (f == 1) ? 20 : $urandom_range(60, 160);
    for (int n = 0; n < npix; n++) begin
      int x, y, fx, fy;
      x = (f == 1) ? $urandom_range(0, 7) : $urandom_range(0, 127);
      y = $urandom_range(0, 127);
      px.push_back(x); py.push_back(y);
      fx = x / 4 - 2; fy = y / 4 - 2;
      if (fx >= 0 && fx < 28 && fy >= 0 && fy < 28) img[fy*28+fx] = 1;
      else n_cropped++;
    end
    exp_q.push_back(predict(img));
    begin
      int np;
      np = 0;
      foreach (img[i]) np += int'(img[i]);
      npix_q.push_back(np);
    end
    // burst: replay the pixel set for T_BURST cycles
    begin
      longint t_end;
      int k;
      bit paused;
      t_end = $time + 64'(T_BURST) * 10;
      k = 0;
      paused = 0;
      while ($time < t_end) begin
        if (T_PAUSE > 0 && !paused && active) begin
          paused = 1;
          repeat (T_PAUSE) @(negedge clk);
        end
        dvs_send(px[k], py[k], 1'($urandom));
        k = (k + 1) % px.size();
      end
    end
    repeat (T_GAP) @(negedge clk);
  end
  // wait for the last result
  while (got_q.size() < exp_q.size()) @(negedge clk);
  repeat (100) @(negedge clk);
  checks++;
  if (got_q.size() != exp_q.size()) begin
    failures++; $display("results: got %0d want %0d", got_q.size(), exp_q.size());
  end
  for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
    checks++;
    n_results++;
    if (got_q[i][4] == 1'b0) n_winner++;
    if (got_q[i] != exp_q[i]) begin
      failures++;
      $display("frame %0d: result %h want %h", i, got_q[i], exp_q[i]);
    end
  end
  $display("hold-blocked cycles %0d; latency checked on %0d frames, longest %0d cycles",
           n_hold_block, n_lat_checked, lat_max);
  $display("frames %0d refractory-blocked cycles %0d cropped %0d conv stalls %0d pool contention %0d",
           n_frames, n_ref_block, n_cropped, n_conv_stall, n_pool_contend);
  $display("fired: conv %0d pool %0d fc %0d; conv EOFs %0d; results %0d with winner %0d",
           n_conv_fire, n_pool_fire, n_fc_fire, n_eof_conv, n_results, n_winner);
  checks++; if (n_frames != T_FRAMES || n_lat_checked != T_FRAMES) failures++;
  checks++; if (T_EXPECT_REF && n_ref_block == 0) failures++;
  checks++; if (T_PAUSE > 0 && n_hold_block == 0) failures++;
  checks++; if (n_cropped == 0) failures++;
  checks++; if (n_conv_stall == 0) failures++;
  checks++; if (n_pool_contend == 0) failures++;
  checks++; if (n_conv_fire == 0 || n_pool_fire == 0 || n_fc_fire == 0) failures++;
  checks++; if (n_eof_conv != 3 * T_FRAMES) failures++;
  checks++; if (n_winner == 0 || n_winner == n_results) failures++;
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
