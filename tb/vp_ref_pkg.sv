// vp_ref_pkg: reference models used by the predictor testbenches.
//
// Written independently of the RTL from the predictor rules: the trace index
// as a per-bit parity fold, the increment rule (the predicted increment is
// replaced by a new one seen in two consecutive runs, if it fits in 16
// signed bits), the context rule (history of three values, shifted by 0, 2
// and 4 bits and xor-ed into a prediction-table index), 3-bit saturating
// confidence counters and the hybrid choice (higher confidence wins, ties
// to the increment predictor).
package vp_ref_pkg;

  function automatic int ref_trace_index(int unsigned w, logic [31:0] pc,
                                         logic [15:0] br, logic [5:0] rg);
    logic [63:0] mb;
    int r;
    mb = '0;
    for (int i = 2; i < 32; i++) mb[i-2] ^= pc[i];
    for (int i = 0; i < 16; i++) mb[6+i] ^= br[i];
    for (int i = 0; i < 6; i++)  mb[i]   ^= rg[i];
    r = 0;
    for (int i = 0; i < 64; i++) if (mb[i]) r = r ^ (1 << (i % w));
    return r;
  endfunction

  function automatic int sat(int c, bit up);
    if (up) return (c == 7) ? 7 : c + 1;
    return (c == 0) ? 0 : c - 1;
  endfunction

  class incr_ref;
    longint pinc[], linc[];
    int     conf[];
    function new(int n);
      pinc = new[n]; linc = new[n]; conf = new[n];
      foreach (pinc[i]) begin pinc[i] = 0; linc[i] = 0; conf[i] = 0; end
    endfunction
    function longint predict(int i, longint base);
      return base + pinc[i];
    endfunction
    // returns whether the entry predicted 'actual'
    function bit update(int i, longint base, longint actual);
      longint d = actual - base;
      bit hit = (base + pinc[i]) == actual;
      if (d >= -32768 && d <= 32767 && d == linc[i]) pinc[i] = d;
      linc[i] = longint'(signed'(d[15:0]));
      conf[i] = sat(conf[i], hit);
      return hit;
    endfunction
  endclass

  class fcm_ref;
    int unsigned w;
    longint h0[], h1[], h2[], vpt[];
    int     conf[];
    function new(int n);
      w = $clog2(n);
      h0 = new[n]; h1 = new[n]; h2 = new[n]; vpt = new[n]; conf = new[n];
      foreach (h0[i]) begin h0[i] = 0; h1[i] = 0; h2[i] = 0; vpt[i] = 0; conf[i] = 0; end
    endfunction
    function int hash(int i);
      logic [67:0] m;
      int r;
      m = {4'b0, h0[i]} ^ ({4'b0, h1[i]} << 2) ^ ({4'b0, h2[i]} << 4);
      r = 0;
      for (int b = 0; b < 68; b++) if (m[b]) r = r ^ (1 << (b % w));
      return r;
    endfunction
    function longint predict(int i);
      return vpt[hash(i)];
    endfunction
    function bit update(int i, longint actual);
      int  h = hash(i);
      bit  hit = vpt[h] == actual;
      vpt[h] = actual;
      h2[i] = h1[i]; h1[i] = h0[i]; h0[i] = actual;
      conf[i] = sat(conf[i], hit);
      return hit;
    endfunction
  endclass

endpackage
