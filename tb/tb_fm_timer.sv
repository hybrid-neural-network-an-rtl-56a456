// tb_fm_timer: self-checking test of the frame-maker time base.
// With TICK_DIV = 7 the tick must come every 7 cycles exactly and time_now
// must count the ticks.
module tb_fm_timer;
  logic clk = 0, rst_n = 0;
  logic tick;
  logic [31:0] t;
  int checks = 0, failures = 0;
  int ticks = 0, last_tick = -1, cyc = 0;

  fm_timer #(.TICK_DIV(7), .TIME_W(32)) dut (.clk, .rst_n, .tick, .time_now(t));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (cyc = 0; cyc < 700; cyc++) begin
      @(posedge clk); #1;
      if (tick) begin
        ticks++;
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 7) begin failures++; $display("period %0d", cyc - last_tick); end
        end
        last_tick = cyc;
        checks++;
        if (t != 32'(ticks)) begin failures++; $display("time %0d ticks %0d", t, ticks); end
      end
    end
    checks++;
    if (ticks != 100) begin failures++; $display("ticks %0d", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
