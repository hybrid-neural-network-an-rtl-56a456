// frame2aer: Frame2AER converter. Turns a ready binary frame into AER events.
//
// When frame_rdy is high the converter scans the frame row by row, one pixel
// per cycle, and for each set pixel offers one event (x, y, val = 1) on the
// valid/ready output, waiting while the next layer is not ready. Every
// pixel is cleared after it has been read. After the last pixel it offers the
// end-of-frame command event and, when that is taken, pulses done to release
// the frame memory. A frame of FRAME_W x FRAME_W pixels with N set pixels
// takes FRAME_W^2 + 1 cycles plus back-pressure.
//
// The document gives the converter's function and the EOF command; the scan
// order, the value 1 for a set pixel and the handshake are this design's
// choices.
module frame2aer
  import hnn_pkg::*;
#(
  parameter int unsigned FRAME_W = 28,
  localparam int unsigned FX_W   = $clog2(FRAME_W)
) (
  input  logic            clk,
  input  logic            rst_n,
  // frame memory side
  input  logic            frame_rdy,
  output logic [FX_W-1:0] rd_x,
  output logic [FX_W-1:0] rd_y,
  input  logic            rd_bit,
  output logic            clr,
  output logic            done,
  // AER output
  output logic            out_valid,
  input  logic            out_ready,
  output aer_evt_t        out_evt
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_EOF} state_t;
  state_t state;
  logic   step;

  always_comb begin
    out_evt   = '0;
    out_valid = 1'b0;
    step      = 1'b0;
    clr       = 1'b0;
    done      = 1'b0;
    unique case (state)
      S_SCAN: begin
        out_evt.x   = POS_W'(rd_x);
        out_evt.y   = POS_W'(rd_y);
        out_evt.val = VAL_W'(1);
        out_valid   = rd_bit;
        step        = !rd_bit || out_ready;
        clr         = step;
      end
      S_EOF: begin
        out_evt.eof = 1'b1;
        out_valid   = 1'b1;
        done        = out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rd_x  <= '0;
      rd_y  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (frame_rdy) begin
          rd_x  <= '0;
          rd_y  <= '0;
          state <= S_SCAN;
        end
        S_SCAN: if (step) begin
          if (rd_x == FX_W'(FRAME_W - 1)) begin
            rd_x <= '0;
            if (rd_y == FX_W'(FRAME_W - 1)) state <= S_EOF;
            else rd_y <= rd_y + 1'b1;
          end else begin
            rd_x <= rd_x + 1'b1;
          end
        end
        S_EOF: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
