// fm_timer: time base of the frame-maker.
//
// A prescaler divides the clock by TICK_DIV and pulses tick once per period;
// time_now counts ticks and wraps around. The event rate calculator counts
// events per window of ticks and the controller compares time_now against
// the refractory and hold intervals, so all three share one time unit.
//
// The document shows a Timer feeding the event rate calculator and uses a
// notion of time in the controller algorithm; the tick period (1 us at the
// 220 MHz clock the document reports) and the 32-bit count are this
// design's choices.
module fm_timer #(
  parameter int unsigned TICK_DIV = 220,
  parameter int unsigned TIME_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              tick,
  output logic [TIME_W-1:0] time_now
);

  localparam int unsigned DIV_W = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  logic [DIV_W-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= '0;
      tick     <= 1'b0;
      time_now <= '0;
    end else begin
      tick <= 1'b0;
      if (div == DIV_W'(TICK_DIV - 1)) begin
        div      <= '0;
        tick     <= 1'b1;
        time_now <= time_now + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

endmodule
