// sova_ref: testbench reference model of the decoder's algorithm, written
// with plain integers and history arrays rather than the ring structure.
//   acs_step  one trellis step of add-compare-select on integer metrics
//             (no wrap-around), giving predecessor pointers and clipped
//             |metric differences|;
//   trace     the traceback the ring performs for the symbol at time k:
//             N Viterbi/SOVA steps from state 0, the competitor starting
//             SOVA_OFS steps back, with the soft update
//             rel = min(rel, delta[S]) wherever the two paths' decisions
//             differ. Times before 0 read pointer 0 and delta 63.
package sova_ref;
  localparam int MAXT = 4096;

  class model;
    int n_cells, sova_ofs;
    int pm [8];
    int ptrh [MAXT][8];
    int delh [MAXT][8];
    int t;

    function new(int n, int ofs, int init_pm);
      n_cells = n; sova_ofs = ofs; t = 0;
      for (int s = 0; s < 8; s++) pm[s] = (s == 0) ? 0 : init_pm;
    endfunction

    static function int code(int from, int u);
      int g0, g1, g2, u1, u2, u3;
      u1 = from & 1; u2 = (from >> 1) & 1; u3 = (from >> 2) & 1;
      g0 = u ^ u2 ^ u3; g1 = u ^ u1 ^ u3; g2 = u ^ u1 ^ u2 ^ u3;
      return g0 | (g1 << 1) | (g2 << 2);
    endfunction

    static function int bm(int c, int y0, int y1, int y2);
      return ((c & 1) ? -y0 : y0) + ((c & 2) ? -y1 : y1) + ((c & 4) ? -y2 : y2);
    endfunction

    // Feed one received symbol; stores the step at index t.
    function void acs_step(int y0, int y1, int y2);
      int nw [8];
      for (int s = 0; s < 8; s++) begin
        int p0, p1, m0, m1, d;
        p0 = s >> 1; p1 = (s >> 1) | 4;
        m0 = pm[p0] + bm(code(p0, s & 1), y0, y1, y2);
        m1 = pm[p1] + bm(code(p1, s & 1), y0, y1, y2);
        if (m1 < m0) begin nw[s] = m1; ptrh[t][s] = p1; end
        else         begin nw[s] = m0; ptrh[t][s] = p0; end
        d = (m0 > m1) ? m0 - m1 : m1 - m0;
        delh[t][s] = (d > 63) ? 63 : d;
      end
      pm = nw;
      t++;
    endfunction

    // Store a step directly (for testing the traceback on its own).
    function void put_step(int p [8], int d [8]);
      ptrh[t] = p; delh[t] = d; t++;
    endfunction

    // Traceback for the newest stored step; returns {rel, bit}.
    function int trace();
      int k, s, sc, rel;
      k = t - 1; s = 0; sc = 0; rel = 63;
      for (int j = 0; j < n_cells; j++) begin
        int tt, p [8], d [8];
        tt = k - j;
        for (int x = 0; x < 8; x++) begin
          p[x] = (tt >= 0) ? ptrh[tt][x] : 0;
          d[x] = (tt >= 0) ? delh[tt][x] : 63;
        end
        if (j == sova_ofs) begin
          sc = p[s] ^ 4; s = p[s]; rel = 63;
        end else begin
          if (j > sova_ofs && (s & 1) != (sc & 1) && d[s] < rel) rel = d[s];
          sc = p[sc]; s = p[s];
        end
      end
      return (rel << 1) | (s & 1);
    endfunction
  endclass
endpackage
