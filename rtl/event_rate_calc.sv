// event_rate_calc: input event rate of the frame-maker, over a sliding
// window.
//
// Time is cut into bins of BIN_TICKS timer ticks. The unit keeps the event
// counts of the last N_BINS-1 closed bins and counts the open bin as events
// arrive. rate is the sum of both: the number of events in the current bin
// and the N_BINS-1 bins before it, a window of between (N_BINS-1) and N_BINS
// bins. The rate therefore rises on the very event that brings it to the
// threshold, so only the events before that one are lost to a frame, and it
// falls back one bin at a time after activity stops. All counts saturate.
// rate is registered: it includes an event one cycle after its ev_v strobe.
//
// The document shows an Event Rate Calculator fed by the sensor's data_v
// and by a Timer, and compares its output with a threshold. The sliding
// window of bins (default 10 bins of 100 ticks, 1 ms with the default timer)
// and the event count as the rate unit are this design's choices.
module event_rate_calc #(
  parameter int unsigned BIN_TICKS = 100,
  parameter int unsigned N_BINS    = 10,
  parameter int unsigned RATE_W    = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              ev_v,
  output logic [RATE_W-1:0] rate
);

  localparam int unsigned BT_W = (BIN_TICKS > 1) ? $clog2(BIN_TICKS) : 1;
  localparam int unsigned NB   = (N_BINS > 1) ? N_BINS - 1 : 1;  // closed bins kept
  localparam int unsigned SUM_W = RATE_W + $clog2(NB + 1);

  logic [BT_W-1:0]   bin_ticks;
  logic [RATE_W-1:0] cur;              // open bin
  logic [RATE_W-1:0] hist [NB];        // closed bins, hist[0] newest
  logic [SUM_W-1:0]  closed_sum;       // sum of hist, never overflows
  logic [RATE_W-1:0] cur_inc;
  logic              bin_end;
  logic [SUM_W:0]    total;

  assign cur_inc = (ev_v && cur != '1) ? cur + 1'b1 : cur;
  assign bin_end = tick && (bin_ticks == BT_W'(BIN_TICKS - 1));

  always_comb begin
    total = (SUM_W+1)'(closed_sum) + (SUM_W+1)'(cur_inc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_ticks  <= '0;
      cur        <= '0;
      closed_sum <= '0;
      rate       <= '0;
      for (int i = 0; i < int'(NB); i++) hist[i] <= '0;
    end else begin
      rate <= (total > (SUM_W+1)'({RATE_W{1'b1}})) ? '1 : RATE_W'(total);
      if (tick) bin_ticks <= bin_end ? '0 : bin_ticks + 1'b1;
      if (bin_end) begin
        if (N_BINS > 1) begin
          hist[0] <= cur_inc;
          for (int i = 1; i < int'(NB); i++) hist[i] <= hist[i-1];
          closed_sum <= closed_sum + SUM_W'(cur_inc) - SUM_W'(hist[NB-1]);
        end
        cur <= '0;
      end else begin
        cur <= cur_inc;
      end
    end
  end

endmodule
