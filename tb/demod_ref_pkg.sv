// demod_ref_pkg: reference model of the DTCWT OFDM demodulator for the
// testbenches. It recomputes, sample by sample and without any of the
// hardware's structure, the decomposition of the received signal:
//   level 1      direct 10-tap convolution with the first-stage filters of
//                both trees, every second sample, scaled by 1/64;
//   levels 2..   the grouped filters (sums of window pairs times coefficient
//                vectors) of both trees, every second low-pass sample of the
//                level before, scaled by 1/64 with saturation to 16 bits.
// It predicts the detail outputs per level and the approximation outputs
// of the configured last level, and stops at the deepest level the chain of
// processing units can reach.
package demod_ref_pkg;
  import dtcwt_pkg::*;

  typedef struct { int a; int b; } pair_t;

  class demod_ref;
    int last;        // configured last level
    int max_lvl;     // deepest level the hardware holds
    int w0 [NTAP];
    bit par0;
    int wa [int][NTAP];
    int wb [int][NTAP];
    bit par [int];
    pair_t qdet [int][$];
    pair_t qapx [$];

    function new(int last_lvl, int deepest);
      last    = last_lvl;
      max_lvl = deepest;
      for (int i = 0; i < int'(NTAP); i++) w0[i] = 0;
      par0 = 0;
    endfunction

    static function int sc(longint v);
      longint s;
      s = v >>> 6;
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      return int'(s);
    endfunction

    static function longint dot(int w [NTAP], int v [NTERM]);
      longint s;
      s = 0;
      for (int j = 0; j < int'(NTERM); j++)
        s += longint'(v[j]) * longint'(w[PAIR0[j]] + w[PAIR1[j]]);
      return s;
    endfunction

    function void level_in(int g, int a, int b);
      if (!wa.exists(g)) begin
        for (int i = 0; i < int'(NTAP); i++) begin wa[g][i] = 0; wb[g][i] = 0; end
        par[g] = 0;
      end
      for (int i = int'(NTAP) - 1; i > 0; i--) begin
        wa[g][i] = wa[g][i-1];
        wb[g][i] = wb[g][i-1];
      end
      wa[g][0] = a;
      wb[g][0] = b;
      par[g] = !par[g];
      if (!par[g]) begin
        int la, ha, lb, hb;
        la = sc(dot(wa[g], OSA_V0));
        ha = sc(dot(wa[g], OSA_V1));
        lb = sc(dot(wb[g], OSA_V0));
        hb = sc(dot(wb[g], OSA_V2));
        qdet[g].push_back('{ha, hb});
        if (g == last)         qapx.push_back('{la, lb});
        else if (g < max_lvl)  level_in(g + 1, la, lb);
      end
    endfunction

    function void push(int x);
      for (int i = int'(NTAP) - 1; i > 0; i--) w0[i] = w0[i-1];
      w0[0] = x;
      par0 = !par0;
      if (!par0) begin
        longint s [4];
        for (int f = 0; f < 4; f++) begin
          s[f] = 0;
          for (int i = 0; i < int'(NTAP); i++) s[f] += longint'(LS1[f][i]) * longint'(w0[i]);
        end
        qdet[1].push_back('{sc(s[1]), sc(s[3])});
        if (last > 1) level_in(2, sc(s[0]), sc(s[2]));
      end
    endfunction

    function int pending();
      int n;
      n = qapx.size();
      foreach (qdet[g]) n += qdet[g].size();
      return n;
    endfunction
  endclass
endpackage
