// tb_hybridnet_full: end-to-end test of HybridNet with every parameter at
// its default (1 us tick at 220 MHz, 1 ms rate window, 30-cycle convolution
// events). Threshold 2000 events per window, no refractory time, hold 500
// ticks. Three frames, each a burst of about three windows: the second lies
// wholly in the cropped border, so it is an empty frame without a winner.
// See tb_hnn_body.svh for the checks.
module tb_hybridnet_full;
  localparam int T_THR = 2000, T_REF = 0, T_HOLD = 500;
  localparam int T_FRAMES = 3, T_BURST = 660000, T_GAP = 500000, T_START = 100;
  localparam int T_WATCHDOG = 6000000;
  localparam int T_PAUSE = 0;
  localparam bit T_EXPECT_REF = 0;

  `include "tb_hnn_body.svh"

  hybridnet_top dut (
    .clk, .rst_n, .dvs_req, .dvs_data, .dvs_ack,
    .threshold(16'(T_THR)), .ref_time(32'(T_REF)), .hold_time(32'(T_HOLD)),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_neuron, .cfg_data,
    .tx_req, .tx_data, .tx_ack, .active, .frame_rdy, .rate);
endmodule
