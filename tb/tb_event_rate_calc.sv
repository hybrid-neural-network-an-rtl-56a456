// tb_event_rate_calc: self-checking test of the sliding-window event rate.
// A tick comes every 3 cycles, a bin is 4 ticks (12 cycles) and the window
// is 5 bins. Random bursts and silences drive ev_v; the test keeps its own
// per-cycle event history and checks rate on every cycle against the count
// of events from the start of the bin four bins back up to the previous
// cycle. It also checks saturation of the 5-bit rate.
module tb_event_rate_calc;
  logic clk = 0, rst_n = 0;
  logic tick = 0, ev = 0;
  logic [4:0] rate;
  int checks = 0, failures = 0, n_sat = 0;

  localparam int TDIV = 3, BIN = 4, NB = 5;
  localparam int BIN_CYC = TDIV * BIN;

  event_rate_calc #(.BIN_TICKS(BIN), .N_BINS(NB), .RATE_W(5)) dut (
    .clk, .rst_n, .tick, .ev_v(ev), .rate);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    int want, start;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      // bursts: density changes every 50 cycles
      int dens;
      dens = ((c / 50) % 4 == 0) ? 0 : ((c / 50) % 4 == 1) ? 90 : 30;
      if (c >= 2500) dens = 100;
      ev   = ($urandom_range(0, 99) < dens);
      tick = (c % TDIV == TDIV - 1);
      hist.push_back(ev);
      @(negedge clk);
      // after the edge at the end of cycle c: rate counts events of the
      // current bin and the NB-1 bins before it, including cycle c
      start = ((c + 1) / BIN_CYC - (NB - 1)) * BIN_CYC;
      if (start < 0) start = 0;
      want = 0;
      for (int i = start; i <= c; i++) want += int'(hist[i]);
      // the bin that has just closed at this edge stays counted
      if ((c + 1) % BIN_CYC == 0) begin
        want = 0;
        for (int i = (start - BIN_CYC < 0 ? 0 : start - BIN_CYC); i <= c; i++) want += int'(hist[i]);
      end
      if (want > 31) begin want = 31; n_sat++; end
      checks++;
      if (int'(rate) != want) begin
        failures++;
        if (failures < 10) $display("cycle %0d rate %0d want %0d", c, rate, want);
      end
    end
    ev = 0;
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
