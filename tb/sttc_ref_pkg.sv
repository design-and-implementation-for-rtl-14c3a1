// sttc_ref_pkg: reference models used by the testbenches. They are written
// from the equations, independently of the RTL: the encoder from the
// delay-diversity form of the code, the branch metrics with a full complex
// multiply by the QPSK points, and the Viterbi search with unbounded integer
// path metrics and an explicit trace-back.
package sttc_ref_pkg;

  localparam int NS = 4;     // trellis states
  localparam int NL = 16;    // branch labels

  // QPSK point k = exp(j*pi*k/2)
  function automatic int qpsk_re(int k);
    case (k & 3) 0: return 1; 1: return 0; 2: return -1; default: return 0; endcase
  endfunction
  function automatic int qpsk_im(int k);
    case (k & 3) 0: return 0; 1: return 1; 2: return 0; default: return -1; endcase
  endfunction

  // Encoder: g1 = [(0,2),(2,0)], g2 = [(0,1),(1,0)], sums mod 4.
  // Returns x1*4 + x2 for input pair cur = 2*c1 + c2 and previous pair prev.
  function automatic int ref_enc(int cur, int prev);
    int c1, c2, p1, p2, x1, x2;
    c1 = (cur >> 1) & 1;  c2 = cur & 1;
    p1 = (prev >> 1) & 1; p2 = prev & 1;
    x1 = (0 * c1 + 2 * p1 + 0 * c2 + 1 * p2) % 4;
    x2 = (2 * c1 + 0 * p1 + 1 * c2 + 0 * p2) % 4;
    return x1 * 4 + x2;
  endfunction

  // Squared distance of one received sample to the hypothesis of label l
  // (one receive antenna): |r - h1*x1 - h2*x2|^2
  function automatic longint ref_dist(int rre, int rim, int h1re, int h1im,
                                      int h2re, int h2im, int l);
    int x1, x2;
    longint sre, sim, ere, eim;
    x1 = (l >> 2) & 3; x2 = l & 3;
    sre = h1re * qpsk_re(x1) - h1im * qpsk_im(x1) + h2re * qpsk_re(x2) - h2im * qpsk_im(x2);
    sim = h1re * qpsk_im(x1) + h1im * qpsk_re(x1) + h2re * qpsk_im(x2) + h2im * qpsk_re(x2);
    ere = rre - sre; eim = rim - sim;
    return ere * ere + eim * eim;
  endfunction

  // Quantize a set of distances: subtract the minimum, shift, saturate
  function automatic void ref_quant(input longint d[NL], input int shift,
                                    input int bmax, output int bm[NL]);
    longint dmin;
    dmin = d[0];
    for (int l = 1; l < NL; l++) if (d[l] < dmin) dmin = d[l];
    for (int l = 0; l < NL; l++) begin
      longint q;
      q = (d[l] - dmin) >>> shift;
      bm[l] = (q > bmax) ? bmax : int'(q);
    end
  endfunction

  // Viterbi search with exact integer path metrics.
  class viterbi_ref;
    longint pm[NS];
    int     dec_hist[$][NS];    // decision vectors, index 0 = first step of frame
    int     best_hist[$];

    function void start(longint init_other);
      pm[0] = 0;
      for (int s = 1; s < NS; s++) pm[s] = init_other;
      dec_hist.delete();
      best_hist.delete();
    endfunction

    // One trellis step; branch s -> u carries label (x1 = s, x2 = u).
    function void step(int bm[NL]);
      longint npm[NS];
      int     d[NS];
      int     b;
      for (int u = 0; u < NS; u++) begin
        npm[u] = pm[0] + bm[ref_enc(u, 0)];
        d[u] = 0;
        for (int s = 1; s < NS; s++) begin
          longint c;
          c = pm[s] + bm[ref_enc(u, s)];
          if (c < npm[u]) begin npm[u] = c; d[u] = s; end
        end
      end
      pm = npm;
      b = 0;
      for (int s = 1; s < NS; s++) if (pm[s] < pm[b]) b = s;
      dec_hist.push_back(d);
      best_hist.push_back(b);
    endfunction

    // State at step index 'to' (0-based) on the survivor ending in state
    // 'st' at step index 'from' (from >= to)
    function int trace(int from, int st, int to);
      int s;
      s = st;
      for (int t = from; t > to; t--) s = dec_hist[t][s];
      return s;
    endfunction
  endclass

endpackage
