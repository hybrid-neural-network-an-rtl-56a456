// tb_hnn_ref_pkg: reference arithmetic of the HybridNet layers for the
// testbenches, written from the layer definitions and independent of the RTL:
// signed saturating accumulation in the given width, event-ordered
// convolution, 2x2 max pooling of the fired values, the fully connected sum
// in input order, and the first-maximum rule.
package tb_hnn_ref_pkg;

  function automatic int sat(input int v, input int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // Sign-extend a 4-bit pattern.
  function automatic int s4(input int v);
    v = v & 15;
    return (v >= 8) ? v - 16 : v;
  endfunction

  // Convolution of an event list onto a 24x24 map (28x28 input, 5x5 kernel).
  // mem is indexed y*24+x. Events are applied in list order.
  function automatic void conv_run(input int kern[25], input int evx[$], input int evy[$],
                          input int evv[$], output int mem[576]);
    for (int i = 0; i < 576; i++) mem[i] = 0;
    for (int e = 0; e < evx.size(); e++)
      for (int ky = 0; ky < 5; ky++)
        for (int kx = 0; kx < 5; kx++) begin
          int oy, ox;
          oy = evy[e] - ky;
          ox = evx[e] - kx;
          if (oy >= 0 && oy < 24 && ox >= 0 && ox < 24)
            mem[oy*24+ox] = sat(mem[oy*24+ox] + kern[ky*5+kx] * evv[e], 4);
        end
  endfunction

  // Max pooling of the positive (fired) values of a 24x24 map to 12x12.
  function automatic void pool_run(input int mem[576], output int pool[144]);
    for (int i = 0; i < 144; i++) pool[i] = 0;
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 24; x++) begin
        int v;
        v = (mem[y*24+x] > 0) ? mem[y*24+x] : 0;
        if (v > pool[(y/2)*12 + x/2]) pool[(y/2)*12 + x/2] = v;
      end
  endfunction

  // Expected output word of the whole network for a binary 28x28 frame
  // (row-major, img[y*28+x]): bits 3:0 the first maximum of the positive
  // output neurons, or 16'h0010 when none is positive.
  function automatic logic [15:0] ref_predict(input int kern [3][25], input int fcw [432][10],
                                              input bit img [784]);
    int evx [$];
    int evy [$];
    int evv [$];
    int mem [576];
    int pool [3][144];
    int fm [10];
    int best, bestv;
    for (int i = 0; i < 784; i++)
      if (img[i]) begin evx.push_back(i % 28); evy.push_back(i / 28); evv.push_back(1); end
    for (int c = 0; c < 3; c++) begin
      int p [144];
      int k [25];
      k = kern[c];
      conv_run(k, evx, evy, evv, mem);
      pool_run(mem, p);
      pool[c] = p;
    end
    for (int k = 0; k < 10; k++) fm[k] = 0;
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < 144; i++)
        if (pool[c][i] > 0)
          for (int k = 0; k < 10; k++) fm[k] = sat(fm[k] + fcw[c*144+i][k] * pool[c][i], 4);
    best = -1; bestv = 0;
    for (int k = 0; k < 10; k++) if (fm[k] > 0 && fm[k] > bestv) begin best = k; bestv = fm[k]; end
    return (best < 0) ? 16'h0010 : 16'(best);
  endfunction

endpackage
