// aer_tx: AER transmit interface (synchronous valid/ready word to an
// asynchronous 4-phase req/ack link).
//
// A word offered with valid is taken when ready is high (idle). The block
// drives it onto aer_data, raises aer_req, waits for the receiver's ack
// (through a two-flop synchronizer) to rise, drops req, and waits for ack to
// fall before it accepts the next word. aer_data stays stable from req rising
// until ack has fallen.
//
// The document names the transmit interface (it feeds the USB-AER board) but
// gives no protocol details; the 4-phase handshake is the usual AER one and
// is this design's choice.
module aer_tx #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // synchronous side
  input  logic              valid,
  output logic              ready,
  input  logic [DATA_W-1:0] data,
  // asynchronous AER side
  output logic              aer_req,
  output logic [DATA_W-1:0] aer_data,
  input  logic              aer_ack
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_WAIT_REL} state_t;
  state_t state;
  logic ack_m, ack_s;

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ack_m    <= 1'b0;
      ack_s    <= 1'b0;
      aer_req  <= 1'b0;
      aer_data <= '0;
    end else begin
      ack_m <= aer_ack;
      ack_s <= ack_m;
      unique case (state)
        S_IDLE: if (valid) begin
          aer_data <= data;
          aer_req  <= 1'b1;
          state    <= S_WAIT_ACK;
        end
        S_WAIT_ACK: if (ack_s) begin
          aer_req <= 1'b0;
          state   <= S_WAIT_REL;
        end
        S_WAIT_REL: if (!ack_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
