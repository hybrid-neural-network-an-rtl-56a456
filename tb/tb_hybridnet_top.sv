// tb_hybridnet_top: end-to-end test of HybridNet with a shortened time base
// (tick every 4 cycles, sliding rate window of 5 bins of 5 ticks = 100 cycles) so that several
// frames fit in a short simulation. Threshold 5 events per window, hold 60
// ticks, refractory 1500 ticks: each burst after the first starts inside the
// refractory time of the previous frame, so the controller must hold off,
// and pauses for 120 cycles once Active has risen, a dip in the rate that
// the hold time must bridge.
// Everything else runs at the design's sizes. See tb_hnn_body.svh for the
// checks.
module tb_hybridnet_top;
  localparam int T_THR = 5, T_REF = 1500, T_HOLD = 60;
  localparam int T_FRAMES = 8, T_BURST = 12000, T_GAP = 1000, T_START = 6000;
  localparam int T_WATCHDOG = 800000;
  localparam int T_PAUSE = 120;
  localparam bit T_EXPECT_REF = 1;

  `include "tb_hnn_body.svh"

  hybridnet_top #(.TICK_DIV(4), .BIN_TICKS(5), .N_BINS(5), .CONV_CYCLES(30)) dut (
    .clk, .rst_n, .dvs_req, .dvs_data, .dvs_ack,
    .threshold(16'(T_THR)), .ref_time(32'(T_REF)), .hold_time(32'(T_HOLD)),
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_neuron, .cfg_data,
    .tx_req, .tx_data, .tx_ack, .active, .frame_rdy, .rate);
endmodule
