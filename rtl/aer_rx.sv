// aer_rx: AER receive interface (asynchronous 4-phase req/ack to a
// synchronous one-cycle data_v strobe).
//
// The sender puts a word on aer_data and raises aer_req. The request is
// brought into the clock domain through a two-flop synchronizer. On its
// rising edge the word is captured, data_v pulses for one cycle and ack is
// raised; ack drops again once req has been seen low, which completes the
// four-phase cycle. The data bus needs no synchronizer because the 4-phase
// protocol keeps it stable while req is high.
//
// The document states only that this block converts the sensor's
// asynchronous protocol to a synchronous one; the 4-phase handshake, the
// synchronizer depth and the 16-bit word are this design's choices.
// Latency: data_v follows the rising req by three clock cycles.
module aer_rx #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // asynchronous AER side
  input  logic              aer_req,
  input  logic [DATA_W-1:0] aer_data,
  output logic              aer_ack,
  // synchronous side
  output logic [DATA_W-1:0] data,
  output logic              data_v
);

  logic req_m, req_s, req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_m   <= 1'b0;
      req_s   <= 1'b0;
      req_q   <= 1'b0;
      aer_ack <= 1'b0;
      data    <= '0;
      data_v  <= 1'b0;
    end else begin
      req_m  <= aer_req;
      req_s  <= req_m;
      req_q  <= req_s;
      data_v <= 1'b0;
      if (req_s && !req_q) begin
        data    <= aer_data;
        data_v  <= 1'b1;
        aer_ack <= 1'b1;
      end else if (!req_s) begin
        aer_ack <= 1'b0;
      end
    end
  end

endmodule
