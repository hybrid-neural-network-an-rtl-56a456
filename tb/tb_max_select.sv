// tb_max_select: self-checking test of the MAX unit.
// Frames of output-layer events (random subsets of the ten neurons in order,
// random values, ties included) end with EOF; the result must be the first
// neuron with the largest value, or none for an empty frame. The result is
// taken after a random delay, during which inputs must be held off.
module tb_max_select;
  import hnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, res_valid, res_ready = 0, res_none;
  aer_evt_t in_evt = '0;
  logic [3:0] res_digit, res_val;
  int checks = 0, failures = 0, n_none = 0;

  max_select #(.DIG_W(4)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_evt,
                               .res_valid, .res_ready, .res_digit, .res_none, .res_val);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input aer_evt_t e);
    in_evt = e; in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int best, bestv;
    aer_evt_t e;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      best = -1; bestv = 0;
      for (int k = 0; k < 10; k++)
        if ($urandom_range(0, 2) == 0) begin
          e = '0; e.x = 5'(k); e.val = 4'($urandom_range(1, 4));
          if (best < 0 || int'(e.val) > bestv) begin best = k; bestv = int'(e.val); end
          put(e);
        end
      e = '0; e.eof = 1;
      put(e);
      while (!res_valid) @(negedge clk);
      checks++;
      if (best < 0) begin
        n_none++;
        if (!res_none) failures++;
      end else if (res_none || int'(res_digit) != best || int'(res_val) != bestv) begin
        failures++;
        $display("frame %0d got %0d want %0d", f, res_digit, best);
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (in_ready) failures++;
      end
      res_ready = 1;
      @(negedge clk);
      res_ready = 0;
    end
    checks++;
    if (n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
