// tb_fm_controller: self-checking test of the frame-maker controller FSM.
// The test drives time and rate directly and compares active, cycle by cycle,
// with a reference model of the four conditions C1..C4 (refractory time 20,
// hold time 15, threshold 10). Phases of high and low rate of random lengths
// make the refractory and hold conditions both block and allow transitions;
// the test counts how often each happened.
module tb_fm_controller;
  logic clk = 0, rst_n = 0;
  logic [31:0] t = 0;
  logic [15:0] rate = 0;
  logic active;
  int checks = 0, failures = 0;
  int n_on = 0, n_off = 0, n_ref_block = 0, n_hold_block = 0;

  localparam int REF = 20, HOLD = 15, THR = 10;

  fm_controller #(.TIME_W(32), .RATE_W(16)) dut (
    .clk, .rst_n, .time_now(t), .rate, .threshold(16'(THR)),
    .ref_time(32'(REF)), .hold_time(32'(HOLD)), .active);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_act;
    int last_on, last_off;
    bit high;
    int len;
    m_act = 0; last_on = 0; last_off = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int ph = 0; ph < 300; ph++) begin
      high = ph[0];
      len  = $urandom_range(1, 30);
      for (int c = 0; c < len; c++) begin
        rate = high ? 16'($urandom_range(THR, THR + 20)) : 16'($urandom_range(0, THR - 1));
        // model: next state from present inputs
        if (!m_act) begin
          if (rate >= THR && int'(t) - last_off >= REF) begin m_act = 1; last_on = int'(t); n_on++; end
          else if (rate >= THR) n_ref_block++;
        end else begin
          if (rate < THR && int'(t) - last_on >= HOLD) begin m_act = 0; last_off = int'(t); n_off++; end
          else if (rate < THR) n_hold_block++;
        end
        @(negedge clk);
        checks++;
        if (active != m_act) begin
          failures++;
          if (failures < 10) $display("t=%0d active=%0b want %0b", t, active, m_act);
        end
        t = t + 1;
      end
    end
    $display("activations %0d deactivations %0d refractory blocks %0d hold blocks %0d",
             n_on, n_off, n_ref_block, n_hold_block);
    checks++;
    if (n_on == 0 || n_off == 0 || n_ref_block == 0 || n_hold_block == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
