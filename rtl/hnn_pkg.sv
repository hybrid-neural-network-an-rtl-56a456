// hnn_pkg: types and constants shared by the HybridNet event-driven network.
//
// Layers exchange AER (address-event representation) events over a
// valid/ready stream. One event carries a source address, split into a
// channel and a 2-D position, and a 4-bit value: the source neuron's
// membrane (its ReLU output). A command event with eof=1 marks the end of a
// frame. The 4-bit value and the EOF command follow the document; the field
// layout of the address and the valid/ready handshake are this design's own
// choice.
package hnn_pkg;

  // Value and weight width: the document uses 4-bit weights and membranes.
  localparam int unsigned VAL_W = 4;
  localparam int unsigned POS_W = 5;   // enough for 0..27 (28x28 frame)
  localparam int unsigned CH_W  = 2;   // enough for three feature maps

  typedef struct packed {
    logic             eof;   // 1: end-of-frame command, other fields ignored
    logic [CH_W-1:0]  ch;    // feature map (channel) of the source neuron
    logic [POS_W-1:0] y;     // row of the source neuron
    logic [POS_W-1:0] x;     // column of the source neuron
    logic [VAL_W-1:0] val;   // unsigned output value of the source neuron
  } aer_evt_t;

  // Saturating add of a signed increment to a signed membrane of width W.
  function automatic logic signed [15:0] sat_add(input logic signed [15:0] a,
                                                 input logic signed [15:0] b,
                                                 input int unsigned w);
    logic signed [16:0] s;
    logic signed [16:0] hi;
    logic signed [16:0] lo;
    s  = 17'(a) + 17'(b);
    hi = 17'((1 << (w - 1)) - 1);
    lo = -17'(1 << (w - 1));
    if (s > hi)      return 16'(hi);
    else if (s < lo) return 16'(lo);
    else             return 16'(s);
  endfunction

endpackage
