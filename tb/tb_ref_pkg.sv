// tb_ref_pkg: reference models used by the testbenches.
//
// Written apart from the RTL: the projection coefficients are computed
// from $cos/$sin, the codes by searching for the smallest range, and the jet
// algorithm by direct loops over the cell grid.
package tb_ref_pkg;
  import jem_pkg::*;

  typedef je_t [PHI_ALL-1:0][ETA_ALL-1:0] grid_t;

  function automatic int rnd(real x);
    if (x >= 0.0) return $rtoi(x + 0.5);
    return -$rtoi(-x + 0.5);
  endfunction

  function automatic int coef(int q, int r, bit y);
    real a;
    a = (8.0 * q + r + 0.5) * 2.0 * 3.14159265358979 / 32.0;
    return y ? rnd($sin(a) * 256.0) : rnd($cos(a) * 256.0);
  endfunction

  task automatic energy(input grid_t g, input int q, input bit loopback,
                        output int et, output int ex, output int ey);
    longint sx, sy;
    sx = 0; sy = 0; et = 0;
    for (int r = 0; r < PHI_CORE; r++) begin
      int row;
      row = 0;
      for (int e = 0; e < ETA_ALL; e++) begin
        bit core = (e >= 1 && e <= 4);
        if (core != loopback) row += int'(g[r+1][e]);
      end
      et += row;
      sx += longint'(row) * coef(q, r, 0);
      sy += longint'(row) * coef(q, r, 1);
    end
    ex = int'(sx >>> 8);
    ey = int'(sy >>> 8);
  endtask

  function automatic int code_et(int v);
    for (int r = 0; r < 3; r++)
      if ((v >> (3 * r)) < 64) return (r << 6) | (v >> (3 * r));
    return (3 << 6) | (((v >> 9) > 63) ? 63 : (v >> 9));
  endfunction

  function automatic int code_exy(int v);
    int a, s;
    s = (v < 0) ? 1 : 0;
    a = (v < 0) ? -v : v;
    for (int r = 0; r < 3; r++)
      if ((a >> (3 * r)) < 32) return (s << 7) | (r << 5) | (a >> (3 * r));
    return (s << 7) | (3 << 5) | (((a >> 9) > 31) ? 31 : (a >> 9));
  endfunction

  function automatic int decode_et(int c);
    return (c & 63) * (1 << (3 * ((c >> 6) & 3)));
  endfunction

  function automatic int decode_exy(int c);
    int a;
    a = (c & 31) * (1 << (3 * ((c >> 5) & 3)));
    return (c & 128) ? -a : a;
  endfunction

  function automatic int box(grid_t g, int p0, int e0, int n);
    int s;
    s = 0;
    for (int p = p0; p < p0 + n; p++)
      for (int e = e0; e < e0 + n; e++) s += int'(g[p][e]);
    return s;
  endfunction

  // hits[i] bit t: candidate i = 4*pc + ec passes threshold t
  task automatic jets(input grid_t g, input int thr[N_THR], input int win[N_THR],
                      output int mult[N_THR], output logic [N_THR-1:0] hits[N_ROI]);
    for (int t = 0; t < N_THR; t++) mult[t] = 0;
    for (int pc = 0; pc < PHI_CORE; pc++)
      for (int ec = 0; ec < ETA_CORE; ec++) begin
        int p, e, c, w[3];
        bit lm;
        p = pc + 1; e = ec + 1;
        c = box(g, p, e, 2);
        lm = 1;
        for (int dp = -1; dp <= 1; dp++)
          for (int de = -1; de <= 1; de++) begin
            int n;
            n = box(g, p + dp, e + de, 2);
            if (dp == 0 && de == 0) continue;
            if (dp > 0 || (dp == 0 && de > 0)) begin if (c <= n) lm = 0; end
            else begin if (c < n) lm = 0; end
          end
        w[0] = c;
        w[1] = 0;
        for (int op = -1; op <= 0; op++)
          for (int oe = -1; oe <= 0; oe++)
            if (box(g, p + op, e + oe, 3) > w[1]) w[1] = box(g, p + op, e + oe, 3);
        w[2] = box(g, p - 1, e - 1, 4);
        hits[pc * 4 + ec] = '0;
        for (int t = 0; t < N_THR; t++)
          if (lm && w[win[t]] > thr[t]) begin
            hits[pc * 4 + ec][t] = 1'b1;
            mult[t]++;
          end
      end
    for (int t = 0; t < N_THR; t++) if (mult[t] > 7) mult[t] = 7;
  endtask

  // random grid: a few energetic clusters on a low background
  function automatic grid_t rand_grid(int mode);
    grid_t g;
    for (int p = 0; p < PHI_ALL; p++)
      for (int e = 0; e < ETA_ALL; e++) begin
        case (mode)
          0: g[p][e] = je_t'($urandom_range(0, 1022));
          1: g[p][e] = je_t'($urandom_range(0, 15));
          default: g[p][e] = 10'd1022;
        endcase
      end
    if (mode == 1)
      for (int k = 0; k < 3; k++) begin
        int p = $urandom_range(0, PHI_ALL - 1), e = $urandom_range(0, ETA_ALL - 1);
        g[p][e] = je_t'($urandom_range(100, 1022));
      end
    return g;
  endfunction
endpackage
