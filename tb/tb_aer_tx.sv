// tb_aer_tx: self-checking test of the AER transmit interface.
// Random words are offered on valid/ready; a behavioural receiver answers
// each req with ack after a random delay and records aer_data. The test
// checks the recorded words and their order, and that data is stable while
// req is high.
module tb_aer_tx;
  logic clk = 0, rst_n = 0;
  logic valid = 0, ready;
  logic [15:0] data = '0, aer_data;
  logic req, ack = 0;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  logic [15:0] got [$];

  aer_tx #(.DATA_W(16)) dut (.clk, .rst_n, .valid, .ready, .data, .aer_req(req),
                             .aer_data(aer_data), .aer_ack(ack));

  always #5 clk = ~clk;

  // receiver
  initial begin
    forever begin
      @(negedge clk);
      if (req && !ack) begin
        got.push_back(aer_data);
        repeat ($urandom_range(0, 5)) @(negedge clk);
        ack = 1;
        while (req) begin
          @(negedge clk);
          if (req && aer_data != got[$]) begin failures++; $display("data changed under req"); end
        end
        repeat ($urandom_range(0, 5)) @(negedge clk);
        ack = 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      valid = 1;
      data  = 16'($urandom);
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("sent %0d got %0d", sent.size(), got.size()); end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
