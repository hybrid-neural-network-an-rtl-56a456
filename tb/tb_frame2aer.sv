// tb_frame2aer: self-checking test of the Frame2AER converter.
// The test acts as the frame memory (a random 28x28 binary image) and as a
// next layer with random back-pressure. It checks that exactly the set pixels
// come out, in row order, with val = 1, then one EOF, that each pixel is
// cleared, and that done pulses once per frame.
module tb_frame2aer;
  import hnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_rdy = 0, rd_bit, clr, done;
  logic [4:0] rd_x, rd_y;
  logic out_valid, out_ready = 0;
  aer_evt_t out_evt;
  int checks = 0, failures = 0, stalls = 0;
  bit img [28][28];
  int exp_x [$];
  int exp_y [$];
  int n_eof = 0, n_done = 0;

  frame2aer #(.FRAME_W(28)) dut (.clk, .rst_n, .frame_rdy, .rd_x, .rd_y, .rd_bit, .clr,
                                 .done, .out_valid, .out_ready, .out_evt);

  always #5 clk = ~clk;
  assign rd_bit = img[rd_y][rd_x];

  always @(posedge clk) begin
    if (clr) img[rd_y][rd_x] <= 0;
    if (done) begin n_done++; frame_rdy <= 0; end
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_evt.eof) begin
        n_eof++;
        if (exp_x.size() != 0) begin failures++; $display("EOF early, %0d left", exp_x.size()); end
      end else if (exp_x.size() == 0) begin
        failures++; $display("extra event");
      end else begin
        if (int'(out_evt.x) != exp_x[0] || int'(out_evt.y) != exp_y[0] || out_evt.val != 1) begin
          failures++;
          $display("event %0d,%0d want %0d,%0d", out_evt.x, out_evt.y, exp_x[0], exp_y[0]);
        end
        void'(exp_x.pop_front());
        void'(exp_y.pop_front());
      end
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      for (int y = 0; y < 28; y++)
        for (int x = 0; x < 28; x++) begin
          img[y][x] = ($urandom_range(0, 99) < 10 * f);
          if (img[y][x]) begin exp_x.push_back(x); exp_y.push_back(y); end
        end
      @(negedge clk) frame_rdy = 1;
      while (frame_rdy) @(negedge clk);
      checks++;
      if (n_eof != f + 1 || n_done != f + 1) begin failures++; $display("eof %0d done %0d", n_eof, n_done); end
      foreach (img[i, j]) begin
        checks++;
        if (img[i][j]) failures++;
      end
      repeat (5) @(negedge clk);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
