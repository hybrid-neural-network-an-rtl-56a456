// frame_maker: groups sensor events that occur close together in time into a
// binary frame and sends the frame on as AER events.
//
// Sensor events (data/data_v from the AER receiver) go both to the event
// rate calculator, which counts them over a sliding window of timer ticks,
// and to the
// frame memory. The controller raises active when the rate reaches the
// threshold after the refractory time, and drops it when the rate falls
// below the threshold after the hold time. While active, the frame memory
// collects subsampled and cropped pixels; when active drops, the frame is
// ready and the Frame2AER converter sends one event per set pixel followed by
// an end-of-frame command. The result is an adaptive frame-rate camera: a
// frame is made only when enough happens in front of the sensor.
//
// The block structure follows the document's frame-maker diagram, with the
// 28x28 subsampled frame of its network diagram. The sensor word layout
// (y in bits 14:8, x in bits 7:1, polarity in bit 0, both polarities set a
// pixel) is this design's choice.
module frame_maker
  import hnn_pkg::*;
#(
  parameter int unsigned SENSOR_W     = 128,
  parameter int unsigned SUB          = 4,
  parameter int unsigned CROP         = 2,
  parameter int unsigned FRAME_W      = 28,
  parameter int unsigned TICK_DIV     = 220,
  parameter int unsigned BIN_TICKS    = 100,
  parameter int unsigned N_BINS       = 10,
  parameter int unsigned TIME_W       = 32,
  parameter int unsigned RATE_W       = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       data,
  input  logic              data_v,
  input  logic [RATE_W-1:0] threshold,
  input  logic [TIME_W-1:0] ref_time,
  input  logic [TIME_W-1:0] hold_time,
  output logic              active,
  output logic              frame_rdy,
  output logic [RATE_W-1:0] rate,
  output logic              out_valid,
  input  logic              out_ready,
  output aer_evt_t          out_evt
);

  localparam int unsigned SX_W = $clog2(SENSOR_W);
  localparam int unsigned FX_W = $clog2(FRAME_W);

  logic              tick;
  logic [TIME_W-1:0] time_now;
  logic [FX_W-1:0]   rd_x, rd_y;
  logic              rd_bit, clr, done, busy;

  fm_timer #(.TICK_DIV(TICK_DIV), .TIME_W(TIME_W)) u_timer (
    .clk, .rst_n, .tick, .time_now
  );

  event_rate_calc #(.BIN_TICKS(BIN_TICKS), .N_BINS(N_BINS), .RATE_W(RATE_W)) u_rate (
    .clk, .rst_n, .tick, .ev_v(data_v), .rate
  );

  fm_controller #(.TIME_W(TIME_W), .RATE_W(RATE_W)) u_ctrl (
    .clk, .rst_n, .time_now, .rate, .threshold, .ref_time, .hold_time, .active
  );

  frame_memory #(.SENSOR_W(SENSOR_W), .SUB(SUB), .CROP(CROP), .FRAME_W(FRAME_W)) u_mem (
    .clk, .rst_n,
    .ev_v(data_v), .ev_x(data[1 +: SX_W]), .ev_y(data[8 +: SX_W]),
    .active, .frame_rdy, .busy,
    .rd_x, .rd_y, .rd_bit, .clr, .done
  );

  frame2aer #(.FRAME_W(FRAME_W)) u_f2a (
    .clk, .rst_n, .frame_rdy, .rd_x, .rd_y, .rd_bit, .clr, .done,
    .out_valid, .out_ready, .out_evt
  );

endmodule
