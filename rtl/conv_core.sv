// conv_core: event-driven convolution core, K x K kernel onto an
// OUT_W x OUT_W map of ReLU neurons (defaults: 5x5 kernel, 28x28 input,
// 24x24 neurons).
//
// Each input event (x, y, val) touches the neurons whose receptive field
// holds that pixel: for every kernel tap (ky, kx) the neuron at
// (y - ky, x - kx), if it exists, adds w[ky][kx] * val to its membrane. The
// core sweeps the K*K taps one per cycle through a two-stage pipeline
// (address and product, then read-modify-write of the membrane memory) and
// is ready for the next event EV_CYCLES cycles after it took the last one;
// the document reports 30 cycles per event for its core, and EV_CYCLES
// defaults to that (the sweep itself needs K*K + 2).
//
// The membranes are held in two banks. Events accumulate into one bank;
// on the end-of-frame command the banks swap and a separate scanner walks
// the finished bank in row order while the next frame accumulates into the
// other. A neuron with a positive membrane sends one event (ch = CH_ID, its
// y, x and its membrane as val) and every neuron of the bank is reset to
// zero, then the scanner sends the end-of-frame command itself. An
// end-of-frame command that arrives while the scanner is still busy waits
// for it. So the core takes a new frame every EV_CYCLES cycles per event,
// as in the document's pipelined throughput ("every 17us a new frame can be
// processed"), and the OUT_W*OUT_W scan is hidden unless a frame has fewer
// than about OUT_W*OUT_W/EV_CYCLES events. The two banks are this design's
// way of getting that pipelining; the document does not say how it is done.
// After reset both banks are cleared in OUT_W*OUT_W cycles before the core
// becomes ready.
//
// Weights and membranes are signed 4-bit as in the document; membranes
// saturate at their limits. The kernel is loaded through the cfg port
// (cfg_addr = ky*K + kx). Saturation, the tap order and the scan order are
// this design's choices; the document gives the kernel size, the map size,
// the ReLU fire-once-and-reset rule and the cycle count.
module conv_core
  import hnn_pkg::*;
#(
  parameter int unsigned IN_W      = 28,
  parameter int unsigned K         = 5,
  parameter int unsigned MEM_W     = 4,
  parameter int unsigned W_W       = 4,
  parameter int unsigned EV_CYCLES = 30,
  parameter logic [CH_W-1:0] CH_ID = '0,
  localparam int unsigned OUT_W    = IN_W - K + 1,
  localparam int unsigned N_NEUR   = OUT_W * OUT_W,
  localparam int unsigned NA_W     = $clog2(N_NEUR),
  localparam int unsigned KA_W     = $clog2(K * K)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // kernel configuration
  input  logic                  cfg_we,
  input  logic [KA_W-1:0]       cfg_addr,
  input  logic signed [W_W-1:0] cfg_data,
  // input events
  input  logic                  in_valid,
  output logic                  in_ready,
  input  aer_evt_t              in_evt,
  // output events
  output logic                  out_valid,
  input  logic                  out_ready,
  output aer_evt_t              out_evt
);

  localparam int unsigned CNT_W = $clog2(EV_CYCLES + 1);

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_SWEEP} state_t;
  typedef enum logic [1:0] {SC_IDLE, SC_FIRE, SC_EOF} scan_t;
  state_t state;
  scan_t  sc_state;

  logic signed [W_W-1:0]   w    [K * K];
  logic signed [MEM_W-1:0] mem0 [N_NEUR];
  logic signed [MEM_W-1:0] mem1 [N_NEUR];
  logic                    acc_bank;   // bank the events accumulate into
  logic signed [MEM_W-1:0] acc_q, scan_q;

  logic [POS_W-1:0] ev_x, ev_y;
  logic [VAL_W-1:0] ev_val;
  logic [CNT_W-1:0] cnt;
  logic [$clog2(K)-1:0] kx, ky;
  logic [POS_W-1:0] ox, oy;     // scan position for the scanner / CLEAR
  logic [NA_W-1:0]  scan_addr;

  // pipeline stage 1: neuron address and weighted increment
  logic                  p_we;
  logic [NA_W-1:0]       p_addr;
  logic signed [15:0]    p_inc;

  // tap address arithmetic
  logic signed [POS_W+1:0] ty, tx;
  logic                    t_ok;
  always_comb begin
    ty   = $signed({2'b00, ev_y}) - $signed({{(POS_W+2-$clog2(K)){1'b0}}, ky});
    tx   = $signed({2'b00, ev_x}) - $signed({{(POS_W+2-$clog2(K)){1'b0}}, kx});
    t_ok = (ty >= 0) && (ty < (POS_W+2)'(OUT_W)) &&
           (tx >= 0) && (tx < (POS_W+2)'(OUT_W)) &&
           (cnt < CNT_W'(K * K));
  end

  assign scan_addr = NA_W'(oy) * NA_W'(OUT_W) + NA_W'(ox);
  // an end-of-frame command is only taken when the scanner is free
  assign in_ready  = (state == S_IDLE) && (!in_evt.eof || sc_state == SC_IDLE);

  // read ports: the accumulating bank at the sweep address, the scanned
  // bank at the scan address
  assign acc_q  = acc_bank ? mem1[p_addr] : mem0[p_addr];
  assign scan_q = acc_bank ? mem0[scan_addr] : mem1[scan_addr];

  always_comb begin
    out_evt   = '0;
    out_valid = 1'b0;
    if (sc_state == SC_FIRE) begin
      out_evt.ch  = CH_ID;
      out_evt.y   = oy;
      out_evt.x   = ox;
      out_evt.val = VAL_W'(unsigned'(scan_q));
      out_valid   = (scan_q > 0);
    end else if (sc_state == SC_EOF) begin
      out_evt.eof = 1'b1;
      out_valid   = 1'b1;
    end
  end

  logic scan_step, scan_last;
  assign scan_step = (state == S_CLEAR) || (sc_state == SC_FIRE && (!out_valid || out_ready));
  assign scan_last = (ox == POS_W'(OUT_W - 1)) && (oy == POS_W'(OUT_W - 1));

  // kernel memory
  always_ff @(posedge clk) begin
    if (cfg_we) w[cfg_addr] <= cfg_data;
  end

  // membrane banks: the accumulating bank is written by the sweep, the
  // other one is cleared by the scan; during CLEAR both are cleared
  logic signed [MEM_W-1:0] acc_new;
  assign acc_new = MEM_W'(sat_add(16'(acc_q), p_inc, MEM_W));

  always_ff @(posedge clk) begin
    if (p_we && !acc_bank) mem0[p_addr] <= acc_new;
    else if (scan_step && (state == S_CLEAR || acc_bank)) mem0[scan_addr] <= '0;
  end

  always_ff @(posedge clk) begin
    if (p_we && acc_bank) mem1[p_addr] <= acc_new;
    else if (scan_step && (state == S_CLEAR || !acc_bank)) mem1[scan_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLEAR;
      sc_state <= SC_IDLE;
      acc_bank <= 1'b0;
      cnt    <= '0;
      kx     <= '0;
      ky     <= '0;
      ox     <= '0;
      oy     <= '0;
      ev_x   <= '0;
      ev_y   <= '0;
      ev_val <= '0;
      p_we   <= 1'b0;
      p_addr <= '0;
      p_inc  <= '0;
    end else begin
      p_we <= 1'b0;
      // scan position, shared by CLEAR and the scanner (never both at once)
      if (scan_step) begin
        if (scan_last) begin
          ox <= '0;
          oy <= '0;
        end else if (ox == POS_W'(OUT_W - 1)) begin
          ox <= '0;
          oy <= oy + 1'b1;
        end else begin
          ox <= ox + 1'b1;
        end
      end
      // scanner
      unique case (sc_state)
        SC_FIRE: if (scan_step && scan_last) sc_state <= SC_EOF;
        SC_EOF:  if (out_ready) sc_state <= SC_IDLE;
        default: ;
      endcase
      // accumulation
      unique case (state)
        S_CLEAR: if (scan_last) state <= S_IDLE;
        S_IDLE: if (in_valid && in_ready) begin
          if (in_evt.eof) begin
            acc_bank <= ~acc_bank;
            sc_state <= SC_FIRE;
          end else begin
            ev_x   <= in_evt.x;
            ev_y   <= in_evt.y;
            ev_val <= in_evt.val;
            cnt    <= '0;
            kx     <= '0;
            ky     <= '0;
            state  <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          p_we   <= t_ok;
          p_addr <= NA_W'(unsigned'(ty)) * NA_W'(OUT_W) + NA_W'(unsigned'(tx));
          p_inc  <= 16'(w[int'(ky) * int'(K) + int'(kx)]) * $signed({12'b0, ev_val});
          if (kx == $clog2(K)'(K - 1)) begin
            kx <= '0;
            if (ky != $clog2(K)'(K - 1)) ky <= ky + 1'b1;
          end else begin
            kx <= kx + 1'b1;
          end
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(EV_CYCLES - 2)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (EV_CYCLES >= K * K + 2) else $error("EV_CYCLES too small for the kernel sweep");
  end

endmodule
