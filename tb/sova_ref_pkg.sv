// sova_ref_pkg: behavioural reference model of the SOVA decoder for the
// testbenches. It is written from the code definition, not from the RTL: the
// trellis is enumerated forwards with the encoder equations (next state and parity
// of every state/bit pair), the add-compare-select is done in plain integers, and
// the decoder output is found by tracing paths back through stored decisions
// rather than by register exchange. The integer rules (branch metric, tie break,
// clipping, saturation) are the ones the RTL documents.
package sova_ref_pkg;
  import sova_pkg::*;

  localparam int NS       = 16;
  localparam int PM_MIN   = -512;
  localparam int SOFT_SAT = 1023;

  // Encoder written out bit by bit: state = {a1,a2,a3,a4}.
  function automatic int ref_next(int s, int u);
    int a1, a2, a3, a4, a;
    a1 = (s >> 3) & 1; a2 = (s >> 2) & 1; a3 = (s >> 1) & 1; a4 = s & 1;
    a = u ^ a1 ^ a2 ^ a3 ^ a4;
    return (a << 3) | (a1 << 2) | (a2 << 1) | a3;
  endfunction

  function automatic int ref_parity(int s, int u);
    int a;
    a = u ^ ((s >> 3) & 1) ^ ((s >> 2) & 1) ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ (s & 1);
  endfunction

  // Predecessor of state ns reached with information bit u.
  function automatic int ref_pred(int ns, int u);
    for (int s = 0; s < NS; s++) if (ref_next(s, u) == ns) return s;
    return -1;
  endfunction

  function automatic int sat4(int v);
    if (v > 7) return 7;
    if (v < -8) return -8;
    return v;
  endfunction

  class sova_ref;
    int pm [NS];
    int clip_events;
    int delta_sat_events;

    function new();
      init();
      clip_events = 0;
      delta_sat_events = 0;
    endfunction

    function void init();
      foreach (pm[s]) pm[s] = (s == 0) ? 0 : PM_MIN;
    endfunction

    // One add-compare-select step. Returns per state the hard value and delta
    // and the best state; updates the normalised metrics.
    function void step(int snr, int y, int xe,
                       output bit hard [NS], output int delta [NS], output int best);
      int yw, c [NS][2], uc [NS][2], sel [NS], mx;
      yw = (snr * y) >>> 2;
      for (int s = 0; s < NS; s++) begin
        for (int u = 0; u < 2; u++) begin
          int ns, p, bm;
          ns = ref_next(s, u);
          p  = ref_parity(s, u);
          bm = ((u != 0) ? xe : 0) + ((p != 0) ? yw : 0);
          // slot 0: predecessor with oldest bit 0, slot 1: oldest bit 1
          c[ns][s & 1]  = pm[s] + bm;
          uc[ns][s & 1] = u;
        end
      end
      for (int ns = 0; ns < NS; ns++) begin
        int w, d;
        w = (c[ns][1] > c[ns][0]) ? 1 : 0;
        sel[ns] = c[ns][w];
        // information bit of the winning branch
        hard[ns] = bit'(uc[ns][w]);
        d = c[ns][w] - c[ns][1-w];
        if (d > SOFT_SAT) begin d = SOFT_SAT; delta_sat_events++; end
        delta[ns] = d;
      end
      mx = sel[0]; best = 0;
      for (int ns = 1; ns < NS; ns++) if (sel[ns] > mx) begin mx = sel[ns]; best = ns; end
      for (int ns = 0; ns < NS; ns++) begin
        int n;
        n = sel[ns] - mx;
        if (n < PM_MIN) begin n = PM_MIN; clip_events++; end
        pm[ns] = n;
      end
    endfunction
  endclass

endpackage
