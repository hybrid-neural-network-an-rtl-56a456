// fm_controller: Active/Non-active state machine of the frame-maker.
//
// Follows the document's controller algorithm. In the Non-active state it
// moves to Active when the event rate is at or above the threshold (C1) and
// the refractory time has passed since it last became Non-active (C2). In
// the Active state it returns to Non-active when the rate is below the
// threshold (C3) and the hold time has passed since it last became Active
// (C4). The active output is the state; it is registered, so it changes one
// cycle after the conditions hold.
//
// Times are compared as differences modulo 2^TIME_W, so a wrapping timer is
// harmless as long as the intervals stay below 2^(TIME_W-1) ticks. Reading
// "last Active time" and "last Non-active time" as the moments of entering
// those states, and starting in Non-active with the last Non-active time at
// zero, are this design's choices.
module fm_controller #(
  parameter int unsigned TIME_W = 32,
  parameter int unsigned RATE_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TIME_W-1:0] time_now,
  input  logic [RATE_W-1:0] rate,
  input  logic [RATE_W-1:0] threshold,
  input  logic [TIME_W-1:0] ref_time,
  input  logic [TIME_W-1:0] hold_time,
  output logic              active
);

  typedef enum logic {NON_ACTIVE, ACTIVE} state_t;
  state_t state;
  logic [TIME_W-1:0] last_nonactive, last_active;
  logic c1, c2, c3, c4;

  always_comb begin
    c1 = (rate >= threshold);
    c2 = ((time_now - last_nonactive) >= ref_time);
    c3 = (rate < threshold);
    c4 = ((time_now - last_active) >= hold_time);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= NON_ACTIVE;
      last_nonactive <= '0;
      last_active    <= '0;
    end else begin
      unique case (state)
        NON_ACTIVE: if (c1 && c2) begin
          state       <= ACTIVE;
          last_active <= time_now;
        end
        ACTIVE: if (c3 && c4) begin
          state          <= NON_ACTIVE;
          last_nonactive <= time_now;
        end
        default: state <= NON_ACTIVE;
      endcase
    end
  end

  assign active = (state == ACTIVE);

endmodule
