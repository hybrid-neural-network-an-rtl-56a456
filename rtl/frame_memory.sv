// frame_memory: binary frame store of the frame-maker, with sensor pixel
// subsampling and border cropping.
//
// A sensor event at (ev_x, ev_y) of the SENSOR_W x SENSOR_W array maps to
// frame pixel ((ev_x / SUB) - CROP, (ev_y / SUB) - CROP); events that fall in
// the cropped border are dropped. With the defaults, 128x128 sensor pixels
// are subsampled by 4 to 32x32 and two pixels of each border are cut, which
// leaves the 28x28 frame of the document. The pixel's bit is set.
//
// A frame is captured only while the controller's active signal is high and
// only if the memory was free (frame_rdy low) when active rose. When active
// falls, capture stops and frame_rdy rises: the frame is ready to be read.
// The reader addresses pixels on rd_y/rd_x (combinational read of rd_bit),
// clears each pixel it has read with clr, and pulses done at the end, which
// drops frame_rdy. Events that arrive while a frame is pending are dropped.
// After reset the memory is cleared row by row (FRAME_W cycles, busy high).
//
// The document gives the frame memory's role, the Active/Frame_rdy signals,
// the 28x28 size and the 2x2 border crop; the mapping formula, the
// clear-on-read and the rule for events arriving during read-out are this
// design's choices.
module frame_memory #(
  parameter int unsigned SENSOR_W = 128,
  parameter int unsigned SUB      = 4,
  parameter int unsigned CROP     = 2,
  parameter int unsigned FRAME_W  = 28,
  localparam int unsigned SX_W    = $clog2(SENSOR_W),
  localparam int unsigned FX_W    = $clog2(FRAME_W)
) (
  input  logic            clk,
  input  logic            rst_n,
  // sensor events
  input  logic            ev_v,
  input  logic [SX_W-1:0] ev_x,
  input  logic [SX_W-1:0] ev_y,
  // from the controller
  input  logic            active,
  // read-out side
  output logic            frame_rdy,
  output logic            busy,
  input  logic [FX_W-1:0] rd_x,
  input  logic [FX_W-1:0] rd_y,
  output logic            rd_bit,
  input  logic            clr,
  input  logic            done
);

  logic [FRAME_W-1:0] mem [FRAME_W];
  logic               active_q, capturing;
  logic [FX_W-1:0]    init_row;
  logic               init_busy;
  logic [SX_W-1:0]    sx, sy;
  logic               in_frame;
  logic [FX_W-1:0]    fx, fy;

  always_comb begin
    sx       = ev_x / SX_W'(SUB);
    sy       = ev_y / SX_W'(SUB);
    in_frame = (sx >= SX_W'(CROP)) && (sx < SX_W'(CROP + FRAME_W)) &&
               (sy >= SX_W'(CROP)) && (sy < SX_W'(CROP + FRAME_W));
    fx       = FX_W'(sx - SX_W'(CROP));
    fy       = FX_W'(sy - SX_W'(CROP));
  end

  assign rd_bit = mem[rd_y][rd_x];
  assign busy   = init_busy;

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      capturing <= 1'b0;
      frame_rdy <= 1'b0;
      init_row  <= '0;
      init_busy <= 1'b1;
    end else begin
      active_q <= active;
      if (init_busy) begin
        init_row <= init_row + 1'b1;
        if (init_row == FX_W'(FRAME_W - 1)) init_busy <= 1'b0;
      end
      if (active && !active_q && !frame_rdy && !init_busy) capturing <= 1'b1;
      if (!active && active_q && capturing) begin
        capturing <= 1'b0;
        frame_rdy <= 1'b1;
      end
      if (done) frame_rdy <= 1'b0;
    end
  end

  // storage
  always_ff @(posedge clk) begin
    if (init_busy) begin
      mem[init_row] <= '0;
    end else begin
      if (clr) mem[rd_y][rd_x] <= 1'b0;
      if (capturing && active && ev_v && in_frame) mem[fy][fx] <= 1'b1;
    end
  end

endmodule
