// subsample_pool: 2x2 max subsampling of N_CH feature maps, merged into one
// AER stream (defaults: three 24x24 maps to 3 x 12x12).
//
// The N_CH convolution core outputs come in on separate valid/ready ports.
// A round-robin arbiter takes one event per cycle from the ports whose
// frame is not yet finished; an event (x, y, val) from port c raises the
// stored value of pooled unit (c, y/2, x/2) to val if val is larger. A port's
// end-of-frame command is taken and remembered. Once every port has sent its
// end-of-frame, the unit scans its store in (c, y, x) order, sends one event
// (ch = c, y, x, val) per non-zero unit, clears the store and then sends its
// own end-of-frame command. After reset the store is cleared first.
//
// The document places a 2x2 subsampling stage after the three cores and says
// it detects the most activated neuron, which is read here as max pooling.
// Taking the channel from the port number, the arbitration and the scan
// order are this design's choices.
module subsample_pool
  import hnn_pkg::*;
#(
  parameter int unsigned N_CH  = 3,
  parameter int unsigned IN_W  = 24,
  parameter int unsigned POOL  = 2,
  localparam int unsigned OUT_W = IN_W / POOL,
  localparam int unsigned N_U   = N_CH * OUT_W * OUT_W,
  localparam int unsigned UA_W  = $clog2(N_U),
  localparam int unsigned PI_W  = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] in_valid,
  output logic [N_CH-1:0] in_ready,
  input  aer_evt_t        in_evt [N_CH],
  output logic            out_valid,
  input  logic            out_ready,
  output aer_evt_t        out_evt
);

  typedef enum logic [1:0] {S_CLEAR, S_COLLECT, S_FIRE, S_EOF} state_t;
  state_t state;

  logic [VAL_W-1:0] pool [N_U];
  logic [N_CH-1:0]  eof_seen;
  logic [PI_W-1:0]  last_grant;
  logic [PI_W-1:0]  grant;
  logic             grant_v;
  logic [N_CH-1:0]  req;

  logic [CH_W-1:0]  sc;           // scan position
  logic [POS_W-1:0] sy, sx;
  logic [UA_W-1:0]  scan_addr;
  logic [UA_W-1:0]  upd_addr;
  aer_evt_t         g_evt;

  assign req = (state == S_COLLECT) ? (in_valid & ~eof_seen) : '0;

  // round-robin: first requesting port after the last granted one
  always_comb begin
    grant   = '0;
    grant_v = 1'b0;
    for (int unsigned i = 1; i <= N_CH; i++) begin
      int unsigned p;
      p = (int'(last_grant) + i) % N_CH;
      if (!grant_v && req[p]) begin
        grant   = PI_W'(p);
        grant_v = 1'b1;
      end
    end
  end

  always_comb begin
    in_ready = '0;
    if (grant_v) in_ready[grant] = 1'b1;
  end

  assign g_evt     = in_evt[grant];
  assign upd_addr  = UA_W'(grant) * UA_W'(OUT_W * OUT_W) +
                     UA_W'(g_evt.y / POS_W'(POOL)) * UA_W'(OUT_W) +
                     UA_W'(g_evt.x / POS_W'(POOL));
  assign scan_addr = UA_W'(sc) * UA_W'(OUT_W * OUT_W) + UA_W'(sy) * UA_W'(OUT_W) + UA_W'(sx);

  always_comb begin
    out_evt   = '0;
    out_valid = 1'b0;
    if (state == S_FIRE) begin
      out_evt.ch  = sc;
      out_evt.y   = sy;
      out_evt.x   = sx;
      out_evt.val = pool[scan_addr];
      out_valid   = (pool[scan_addr] != '0);
    end else if (state == S_EOF) begin
      out_evt.eof = 1'b1;
      out_valid   = 1'b1;
    end
  end

  logic scan_step, scan_last;
  assign scan_step = (state == S_CLEAR) || (state == S_FIRE && (!out_valid || out_ready));
  assign scan_last = (sc == CH_W'(N_CH - 1)) && (sy == POS_W'(OUT_W - 1)) &&
                     (sx == POS_W'(OUT_W - 1));

  logic do_upd;
  assign do_upd = grant_v && !g_evt.eof && (g_evt.val > pool[upd_addr]);

  always_ff @(posedge clk) begin
    if (do_upd) pool[upd_addr] <= g_evt.val;
    else if (scan_step) pool[scan_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CLEAR;
      eof_seen   <= '0;
      last_grant <= PI_W'(N_CH - 1);
      sc         <= '0;
      sy         <= '0;
      sx         <= '0;
    end else begin
      unique case (state)
        S_CLEAR, S_FIRE: if (scan_step) begin
          if (scan_last) begin
            sc    <= '0;
            sy    <= '0;
            sx    <= '0;
            state <= (state == S_CLEAR) ? S_COLLECT : S_EOF;
          end else if (sx == POS_W'(OUT_W - 1)) begin
            sx <= '0;
            if (sy == POS_W'(OUT_W - 1)) begin
              sy <= '0;
              sc <= sc + 1'b1;
            end else begin
              sy <= sy + 1'b1;
            end
          end else begin
            sx <= sx + 1'b1;
          end
        end
        S_COLLECT: begin
          if (grant_v) begin
            last_grant <= grant;
            if (g_evt.eof) eof_seen[grant] <= 1'b1;
          end
          if (&eof_seen) begin
            eof_seen <= '0;
            state    <= S_FIRE;
          end
        end
        S_EOF: if (out_ready) state <= S_COLLECT;
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
