// hybridnet_top: HybridNet, an event-driven ANN for a dynamic vision sensor
// (DVS), classifying handwritten digits.
//
// Data flow: the AER receiver brings sensor events into the clock domain.
// The frame-maker collects the events of one burst of activity into a 28x28
// binary frame (subsampled and cropped from the 128x128 sensor) and sends it
// as AER events with an end-of-frame (EOF) command. The frame is broadcast to
// N_CONV = 3 convolution cores (5x5 kernels, 24x24 ReLU neurons each; an
// event is taken only when all three cores are ready). On EOF every core
// fires its positive neurons once and resets. The 2x2 max subsampling stage
// merges the three streams into 3 x 12x12 units and, after the EOFs of all
// cores, forwards the non-zero units to the fully connected layer of ten
// neurons. The MAX unit picks the most activated of those and the AER
// transmitter sends the result out as a 16-bit word: bits 3:0 the digit,
// bit 4 set when no output neuron fired.
//
// Layers only talk through AER events and EOF commands, so each layer
// synchronises its own neurons and no global synchronisation is needed.
//
// Configuration: the kernels and the fully connected weights are loaded
// through one write port. cfg_sel 0..N_CONV-1 selects a convolution core
// (cfg_addr = tap ky*5+kx), cfg_sel = 3 the fully connected layer (cfg_addr =
// input row ch*144 + y*12 + x, cfg_neuron = neuron). threshold, ref_time and
// hold_time are the frame-maker controller's settings; the rate is the
// event count over a sliding window of N_BINS bins of BIN_TICKS ticks, a
// tick being TICK_DIV clock cycles. SENSOR_W, SUB and CROP set the sensor
// geometry: the frame is the sensor subsampled by SUB with CROP pixels cut
// from each border, and must come to 28x28 (128/4 - 2*2 by default).
//
// The structure, sizes, 4-bit arithmetic and the EOF scheme follow the
// document's network; handshakes, word formats and the configuration port are
// this design's choices.
module hybridnet_top
  import hnn_pkg::*;
#(
  parameter int unsigned SENSOR_W     = 128,
  parameter int unsigned SUB          = 4,
  parameter int unsigned CROP         = 2,
  parameter int unsigned TICK_DIV     = 220,
  parameter int unsigned BIN_TICKS    = 100,
  parameter int unsigned N_BINS       = 10,
  parameter int unsigned CONV_CYCLES  = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  // AER input from the sensor (4-phase)
  input  logic        dvs_req,
  input  logic [15:0] dvs_data,
  output logic        dvs_ack,
  // frame-maker controller settings
  input  logic [15:0] threshold,
  input  logic [31:0] ref_time,
  input  logic [31:0] hold_time,
  // weight configuration
  input  logic        cfg_we,
  input  logic [1:0]  cfg_sel,
  input  logic [8:0]  cfg_addr,
  input  logic [3:0]  cfg_neuron,
  input  logic [3:0]  cfg_data,
  // AER output with the prediction (4-phase)
  output logic        tx_req,
  output logic [15:0] tx_data,
  input  logic        tx_ack,
  // status
  output logic        active,
  output logic        frame_rdy,
  output logic [15:0] rate
);

  localparam int unsigned N_CONV = 3;

  initial begin
    assert (SENSOR_W / SUB == 28 + 2 * CROP)
      else $error("sensor geometry does not give a 28x28 frame");
  end

  // sensor events
  logic [15:0] rx_data;
  logic        rx_v;

  aer_rx #(.DATA_W(16)) u_rx (
    .clk, .rst_n,
    .aer_req(dvs_req), .aer_data(dvs_data), .aer_ack(dvs_ack),
    .data(rx_data), .data_v(rx_v)
  );

  // frame-maker
  logic     fm_valid, fm_ready;
  aer_evt_t fm_evt;

  frame_maker #(
    .SENSOR_W(SENSOR_W), .SUB(SUB), .CROP(CROP), .FRAME_W(28),
    .TICK_DIV(TICK_DIV), .BIN_TICKS(BIN_TICKS), .N_BINS(N_BINS), .TIME_W(32), .RATE_W(16)
  ) u_fm (
    .clk, .rst_n,
    .data(rx_data), .data_v(rx_v),
    .threshold, .ref_time, .hold_time,
    .active, .frame_rdy, .rate,
    .out_valid(fm_valid), .out_ready(fm_ready), .out_evt(fm_evt)
  );

  // convolution layer: the frame is broadcast to all cores
  logic [N_CONV-1:0] cv_in_ready, cv_out_valid, cv_out_ready;
  aer_evt_t          cv_out_evt [N_CONV];

  assign fm_ready = &cv_in_ready;

  for (genvar c = 0; c < N_CONV; c++) begin : g_conv
    conv_core #(
      .IN_W(28), .K(5), .MEM_W(4), .W_W(4),
      .EV_CYCLES(CONV_CYCLES), .CH_ID(CH_W'(c))
    ) u_conv (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_sel == 2'(c)), .cfg_addr(cfg_addr[4:0]),
      .cfg_data(cfg_data),
      .in_valid(fm_valid && fm_ready), .in_ready(cv_in_ready[c]), .in_evt(fm_evt),
      .out_valid(cv_out_valid[c]), .out_ready(cv_out_ready[c]), .out_evt(cv_out_evt[c])
    );
  end

  // 2x2 max subsampling
  logic     sp_valid, sp_ready;
  aer_evt_t sp_evt;

  subsample_pool #(.N_CH(N_CONV), .IN_W(24), .POOL(2)) u_pool (
    .clk, .rst_n,
    .in_valid(cv_out_valid), .in_ready(cv_out_ready), .in_evt(cv_out_evt),
    .out_valid(sp_valid), .out_ready(sp_ready), .out_evt(sp_evt)
  );

  // fully connected layer
  logic     fc_valid, fc_ready;
  aer_evt_t fc_evt;

  fc_layer #(.N_IN_CH(N_CONV), .IN_W(12), .N_OUT(10), .MEM_W(4), .W_W(4)) u_fc (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_sel == 2'd3), .cfg_row(cfg_addr), .cfg_neuron(cfg_neuron),
    .cfg_data(cfg_data),
    .in_valid(sp_valid), .in_ready(sp_ready), .in_evt(sp_evt),
    .out_valid(fc_valid), .out_ready(fc_ready), .out_evt(fc_evt)
  );

  // MAX
  logic             res_valid, res_ready, res_none;
  logic [3:0]       res_digit;
  logic [VAL_W-1:0] res_val;

  max_select #(.DIG_W(4)) u_max (
    .clk, .rst_n,
    .in_valid(fc_valid), .in_ready(fc_ready), .in_evt(fc_evt),
    .res_valid, .res_ready, .res_digit, .res_none, .res_val
  );

  // AER output
  aer_tx #(.DATA_W(16)) u_tx (
    .clk, .rst_n,
    .valid(res_valid), .ready(res_ready), .data({11'b0, res_none, res_digit}),
    .aer_req(tx_req), .aer_data(tx_data), .aer_ack(tx_ack)
  );

endmodule
