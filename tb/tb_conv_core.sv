// tb_conv_core: self-checking test of the event-driven 5x5 convolution core.
// A random kernel is loaded; frames of random events (x, y in 0..27, val
// 1..15) are sent, then EOF. The fired events must match the reference
// convolution (positive neurons only, row order, membrane as value, channel
// id), followed by one EOF; later frames check that all neurons were reset.
// Frames are sent back to back, so each frame accumulates while the previous
// one is still being scanned out. Frame sizes include very short and empty
// frames, whose end-of-frame command must wait for the busy scanner.
// Cycle checks at every accepted input: an event or EOF is taken exactly 30
// cycles (the document's figure) after the previous event, one cycle after a
// previous EOF, and an EOF that had to wait is taken the cycle after the
// scanner sent the previous frame's EOF. Random back-pressure is applied to
// the output.
module tb_conv_core;
  import hnn_pkg::*;
  import tb_hnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [4:0] cfg_addr = 0;
  logic signed [3:0] cfg_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  aer_evt_t in_evt = '0, out_evt;
  int checks = 0, failures = 0, stalls = 0;
  int kern [25];
  int ref_mem [576];
  int exp_q [$];     // expected encoded events y*24+x + 1000*val, -1 for EOF
  int n_eof = 0;
  int cycle = 0, last_in = -1, last_out_eof = -1;
  bit last_was_eof = 0;
  int eof_waits = 0, overlap = 0;
  bit scanning = 0;

  conv_core #(.IN_W(28), .K(5), .MEM_W(4), .W_W(4), .EV_CYCLES(30), .CH_ID(2'd2)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .in_valid, .in_ready, .in_evt,
    .out_valid, .out_ready, .out_evt);

  always #5 clk = ~clk;

  always @(negedge clk) out_ready <= ($urandom_range(0, 2) != 0);

  // input timing
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && in_ready) begin
      int want;
      if (scanning && !in_evt.eof) overlap++;
      if (last_in >= 0) begin
        want = last_in + (last_was_eof ? 1 : 30);
        if (in_evt.eof && scanning) begin
          failures++; $display("EOF taken while the scanner is busy");
        end
        if (in_evt.eof && last_out_eof + 1 > want) begin
          want = last_out_eof + 1;
          eof_waits++;
        end
        checks++;
        if (cycle != want) begin
          failures++; $display("input taken at %0d, expected %0d", cycle, want);
        end
      end
      last_in = cycle;
      last_was_eof = in_evt.eof;
      if (in_evt.eof) scanning = 1;
    end
    if (out_valid && out_ready && out_evt.eof) begin
      last_out_eof = cycle;
      scanning = 0;
    end
  end

  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_evt.eof) begin
        n_eof++;
        if (exp_q.size() == 0 || exp_q[0] != -1) begin
          failures++; $display("EOF with events missing");
          while (exp_q.size() != 0 && exp_q[0] != -1) void'(exp_q.pop_front());
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end else if (exp_q.size() == 0 || exp_q[0] == -1) begin
        failures++; $display("unexpected event %0d,%0d", out_evt.x, out_evt.y);
      end else begin
        if (int'(out_evt.y)*24 + int'(out_evt.x) + 1000*int'(out_evt.val) != exp_q[0] ||
            out_evt.ch != 2'd2) begin
          failures++;
          if (failures < 10) $display("got %0d,%0d v%0d want code %0d", out_evt.x, out_evt.y, out_evt.val, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int evx [$];
    int evy [$];
    int evv [$];
    int sizes [] = '{10, 3, 0, 30, 50, 2, 70};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 25; i++) begin
      kern[i] = s4($urandom);
      cfg_we = 1; cfg_addr = 5'(i); cfg_data = 4'(kern[i]);
      @(negedge clk);
    end
    cfg_we = 0;
    foreach (sizes[f]) begin
      evx.delete(); evy.delete(); evv.delete();
      for (int e = 0; e < sizes[f]; e++) begin
        evx.push_back($urandom_range(0, 27));
        evy.push_back($urandom_range(0, 27));
        evv.push_back((f == 0) ? 1 : $urandom_range(1, 15));
      end
      conv_run(kern, evx, evy, evv, ref_mem);
      for (int i = 0; i < 576; i++) if (ref_mem[i] > 0) exp_q.push_back(i + 1000 * ref_mem[i]);
      exp_q.push_back(-1);
      for (int e = 0; e <= evx.size(); e++) begin
        in_valid = 1;
        in_evt   = '0;
        if (e == evx.size()) in_evt.eof = 1;
        else begin
          in_evt.x = 5'(evx[e]); in_evt.y = 5'(evy[e]); in_evt.val = 4'(evv[e]);
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
    end
    while (n_eof != sizes.size()) @(negedge clk);
    checks++;
    if (eof_waits == 0 || overlap == 0) begin
      failures++; $display("EOF waits %0d, events during a scan %0d", eof_waits, overlap);
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
