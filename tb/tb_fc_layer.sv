// tb_fc_layer: self-checking test of the ten-neuron fully connected layer.
// Random 4-bit weights are loaded for all 432 inputs; frames of random input
// events are sent back to back. The test checks that one event is accepted
// per clock cycle, and that after EOF the layer sends the positive neurons in
// order with their saturated membranes (computed by the test), then EOF, and
// starts the next frame from zero.
module tb_fc_layer;
  import hnn_pkg::*;
  import tb_hnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [8:0] cfg_row = 0;
  logic [3:0] cfg_neuron = 0;
  logic signed [3:0] cfg_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  aer_evt_t in_evt = '0, out_evt;
  int checks = 0, failures = 0, n_eof = 0;
  int wt [432][10];
  int exp_q [$];

  fc_layer #(.N_IN_CH(3), .IN_W(12), .N_OUT(10), .MEM_W(4), .W_W(4)) dut (
    .clk, .rst_n, .cfg_we, .cfg_row, .cfg_neuron, .cfg_data,
    .in_valid, .in_ready, .in_evt, .out_valid, .out_ready, .out_evt);

  always #5 clk = ~clk;
  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (out_evt.eof) begin
        n_eof++;
        if (exp_q.size() != 0) begin failures++; $display("EOF with %0d missing", exp_q.size()); end
      end else if (exp_q.size() == 0) begin
        failures++; $display("unexpected event n%0d", out_evt.x);
      end else begin
        if (int'(out_evt.x) + 100*int'(out_evt.val) != exp_q[0]) begin
          failures++;
          $display("got n%0d v%0d want %0d", out_evt.x, out_evt.val, exp_q[0]);
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

  initial begin
    int mem [10];
    int n, t0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 432; r++)
      for (int k = 0; k < 10; k++) begin
        wt[r][k] = s4($urandom);
        cfg_we = 1; cfg_row = 9'(r); cfg_neuron = 4'(k); cfg_data = 4'(wt[r][k]);
        @(negedge clk);
      end
    cfg_we = 0;
    for (int f = 0; f < 6; f++) begin
      for (int k = 0; k < 10; k++) mem[k] = 0;
      n = 3 + 7 * f;
      t0 = $time;
      for (int e = 0; e < n; e++) begin
        int c, y, x, v;
        c = $urandom_range(0, 2); y = $urandom_range(0, 11); x = $urandom_range(0, 11);
        v = $urandom_range(1, 7);
        for (int k = 0; k < 10; k++) mem[k] = sat(mem[k] + wt[c*144+y*12+x][k] * v, 4);
        in_valid = 1;
        in_evt = '0;
        in_evt.ch = 2'(c); in_evt.y = 5'(y); in_evt.x = 5'(x); in_evt.val = 4'(v);
        @(posedge clk); #1;
        checks++;
        if (!in_ready) failures++;   // layer must take every event at once
        @(negedge clk);
      end
      checks++;
      if (($time - t0) != n * 10) begin failures++; $display("%0d events took %0t", n, $time - t0); end
      for (int k = 0; k < 10; k++) if (mem[k] > 0) exp_q.push_back(k + 100 * mem[k]);
      in_evt = '0; in_evt.eof = 1;
      @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      while (n_eof != f + 1) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
