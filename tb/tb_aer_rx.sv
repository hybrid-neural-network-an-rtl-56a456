// tb_aer_rx: self-checking test of the AER receive interface.
// A behavioural sender runs 4-phase handshakes with random words and random
// gaps; the test checks that each word appears exactly once on data/data_v,
// that data_v follows req by three cycles, and that ack follows req.
module tb_aer_rx;
  logic clk = 0, rst_n = 0;
  logic req = 0, ack;
  logic [15:0] din = '0, dout;
  logic dv;
  int checks = 0, failures = 0;
  int pulses = 0;
  logic [15:0] last_word;

  aer_rx #(.DATA_W(16)) dut (.clk, .rst_n, .aer_req(req), .aer_data(din), .aer_ack(ack),
                             .data(dout), .data_v(dv));

  always #5 clk = ~clk;

  always @(negedge clk) if (dv) begin
    pulses++;
    last_word = dout;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    int p0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      din = 16'($urandom);
      p0  = pulses;
      req = 1;
      lat = 0;
      while (!dv) begin @(posedge clk); lat++; #1; end
      checks++;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
      while (!ack) @(posedge clk);
      @(negedge clk);
      #1;
      checks++;
      if (pulses != p0 + 1 || last_word != din) begin
        failures++;
        $display("word %0d: pulses %0d got %h want %h", n, pulses - p0, last_word, din);
      end
      din = 16'($urandom);   // data may change once ack is seen
      req = 0;
      while (ack) @(posedge clk);
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (pulses != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
