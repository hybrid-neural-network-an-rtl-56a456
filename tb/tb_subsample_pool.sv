// tb_subsample_pool: self-checking test of the 2x2 max subsampling stage.
// Three drivers, one per feature map, each send a random list of events
// (x, y in 0..23, val 1..7) with random gaps, then their EOF at different
// times. The output must list the non-zero pooled maxima in (ch, y, x) order,
// computed by the test, then one EOF; a second frame checks that the store
// was cleared. Back-pressure is applied on the output.
module tb_subsample_pool;
  import hnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] in_valid = 0, in_ready;
  aer_evt_t in_evt [3];
  logic out_valid, out_ready = 0;
  aer_evt_t out_evt;
  int checks = 0, failures = 0, n_eof = 0, stalls = 0, contention = 0;
  int ref_pool [432];
  int exp_q [$];
  int sent_done;

  subsample_pool #(.N_CH(3), .IN_W(24), .POOL(2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_evt, .out_valid, .out_ready, .out_evt);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if ($countones(in_valid) > 1) contention++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_evt.eof) begin
        n_eof++;
        if (exp_q.size() != 0) begin failures++; $display("EOF with %0d missing", exp_q.size()); end
      end else if (exp_q.size() == 0) begin
        failures++; $display("unexpected event");
      end else begin
        if (int'(out_evt.ch)*144 + int'(out_evt.y)*12 + int'(out_evt.x) + 1000*int'(out_evt.val) != exp_q[0]) begin
          failures++;
          if (failures < 10) $display("got c%0d %0d,%0d v%0d want %0d", out_evt.ch, out_evt.x, out_evt.y, out_evt.val, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < 3; c++) begin : g_drv
    initial begin
      in_evt[c] = '0;
    end
  end

  task automatic drive(input int c, input int n);
    for (int e = 0; e <= n; e++) begin
      aer_evt_t ev;
      int x, y, v;
      ev = '0;
      if (e == n) begin
        repeat ($urandom_range(0, 40)) @(negedge clk);
        ev.eof = 1;
      end else begin
        x = $urandom_range(0, 23); y = $urandom_range(0, 23); v = $urandom_range(1, 7);
        ev.x = 5'(x); ev.y = 5'(y); ev.val = 4'(v);
        ev.ch = 2'($urandom_range(0, 3));   // the port number is the channel
        if (v > ref_pool[c*144 + (y/2)*12 + x/2]) ref_pool[c*144 + (y/2)*12 + x/2] = v;
      end
      in_evt[c] = ev;
      in_valid[c] = 1;
      @(posedge clk);
      while (!in_ready[c]) @(posedge clk);
      @(negedge clk);
      in_valid[c] = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 432; i++) ref_pool[i] = 0;
      fork
        drive(0, 40 + 30 * f);
        drive(1, 60);
        drive(2, 20 * f);
      join
      for (int i = 0; i < 432; i++) if (ref_pool[i] > 0) exp_q.push_back(i + 1000 * ref_pool[i]);
      while (n_eof != f + 1) @(negedge clk);
    end
    checks++;
    if (stalls == 0 || contention == 0) failures++;
    $display("stalls %0d contention %0d", stalls, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
