// max_select: MAX operation on the output layer; presents the most activated
// neuron as the predicted digit.
//
// It takes the output events of the last layer (x = neuron number,
// val = membrane) and keeps the neuron with the largest value; on a tie the
// neuron that arrived first, which is the lower-numbered one, is kept. On the
// end-of-frame command it offers the result (digit, and none = 1 if no
// neuron fired) on a valid/ready output and holds in_ready low until the
// result is taken; then it starts over for the next frame.
//
// The document gives the function; the tie rule and the no-winner flag are
// this design's choices.
module max_select
  import hnn_pkg::*;
#(
  parameter int unsigned DIG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  aer_evt_t         in_evt,
  output logic             res_valid,
  input  logic             res_ready,
  output logic [DIG_W-1:0] res_digit,
  output logic             res_none,
  output logic [VAL_W-1:0] res_val
);

  logic             have;
  logic [DIG_W-1:0] best;
  logic [VAL_W-1:0] best_val;

  assign in_ready = !res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have      <= 1'b0;
      best      <= '0;
      best_val  <= '0;
      res_valid <= 1'b0;
      res_digit <= '0;
      res_none  <= 1'b0;
      res_val   <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (in_evt.eof) begin
          res_valid <= 1'b1;
          res_digit <= best;
          res_none  <= !have;
          res_val   <= best_val;
          have      <= 1'b0;
          best      <= '0;
          best_val  <= '0;
        end else if (!have || in_evt.val > best_val) begin
          have     <= 1'b1;
          best     <= DIG_W'(in_evt.x);
          best_val <= in_evt.val;
        end
      end
    end
  end

endmodule
