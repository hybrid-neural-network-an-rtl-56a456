// fc_layer: fully connected layer of N_OUT ReLU neurons (default ten, one
// per digit) over an N_IN_CH x IN_W x IN_W input (default 3 x 12x12 = 432).
//
// All neurons are updated together: an input event (ch, y, x, val) selects
// weight row i = ch*IN_W*IN_W + y*IN_W + x, which holds one signed 4-bit
// weight per neuron, and every neuron adds w[i][n] * val to its membrane in
// the same cycle. The layer therefore takes one input event per clock cycle,
// the rate the document reports. On the end-of-frame command it sends one
// event (x = neuron number, val = membrane) for each neuron with a positive
// membrane, in neuron order, resets all membranes to zero and sends its own
// end-of-frame command.
//
// Weights are written through the cfg port, one 4-bit weight at a time
// (input row cfg_row, neuron cfg_neuron). Signed 4-bit weights and membranes
// follow the document; saturation at the membrane limits and the absence of
// a bias are this design's choices.
module fc_layer
  import hnn_pkg::*;
#(
  parameter int unsigned N_IN_CH = 3,
  parameter int unsigned IN_W    = 12,
  parameter int unsigned N_OUT   = 10,
  parameter int unsigned MEM_W   = 4,
  parameter int unsigned W_W     = 4,
  localparam int unsigned N_IN   = N_IN_CH * IN_W * IN_W,
  localparam int unsigned RA_W   = $clog2(N_IN),
  localparam int unsigned NO_W   = $clog2(N_OUT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // weight configuration
  input  logic                  cfg_we,
  input  logic [RA_W-1:0]       cfg_row,
  input  logic [NO_W-1:0]       cfg_neuron,
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

  typedef enum logic [1:0] {S_IDLE, S_FIRE, S_EOF} state_t;
  state_t state;

  logic [N_OUT*W_W-1:0]    w   [N_IN];
  logic signed [MEM_W-1:0] mem [N_OUT];
  logic [NO_W-1:0]         n;
  logic [RA_W-1:0]         row;
  logic [N_OUT*W_W-1:0]    wrow;

  assign in_ready = (state == S_IDLE);
  assign row      = RA_W'(in_evt.ch) * RA_W'(IN_W * IN_W) +
                    RA_W'(in_evt.y) * RA_W'(IN_W) + RA_W'(in_evt.x);
  assign wrow     = w[row];

  always_ff @(posedge clk) begin
    if (cfg_we) w[cfg_row][cfg_neuron * W_W +: W_W] <= cfg_data;
  end

  always_comb begin
    out_evt   = '0;
    out_valid = 1'b0;
    if (state == S_FIRE) begin
      out_evt.x   = POS_W'(n);
      out_evt.val = VAL_W'(unsigned'(mem[n]));
      out_valid   = (mem[n] > 0);
    end else if (state == S_EOF) begin
      out_evt.eof = 1'b1;
      out_valid   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      for (int i = 0; i < int'(N_OUT); i++) mem[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          if (in_evt.eof) begin
            n     <= '0;
            state <= S_FIRE;
          end else begin
            for (int i = 0; i < int'(N_OUT); i++) begin
              mem[i] <= MEM_W'(sat_add(16'(mem[i]),
                         16'($signed(wrow[i*W_W +: W_W])) * $signed({12'b0, in_evt.val}),
                         MEM_W));
            end
          end
        end
        S_FIRE: if (!out_valid || out_ready) begin
          mem[n] <= '0;
          if (n == NO_W'(N_OUT - 1)) state <= S_EOF;
          else n <= n + 1'b1;
        end
        S_EOF: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
