// Reference models used by the testbenches. They compute the expected behaviour
// from closed-form expressions rather than by repeating the RTL's iterations:
//   interpolation  y(i) = (4-ph)*x[p] + ph*x[p+1], p = i/4, ph = i%4, x[N] = 0
//   delay          in section s, step j adds floor(D_j / 2^(16+k)) samples with
//                  D_j = D0 + j*E0 + F*j*(j-1)/2
//   apodization    floor(x*w/128), saturated to 14 bits; zone by two boundaries
// plus generators of random coefficient sets whose per-step advance stays >= 1.
package sm3d_ref_pkg;
  import sm3d_pkg::*;

  function automatic int interp(const ref int x[], input int i);
    int p, ph, x0, x1;
    p  = i / 4;
    ph = i % 4;
    x0 = x[p];
    x1 = (p + 1 < x.size()) ? x[p+1] : 0;
    return (4 - ph) * x0 + ph * x1;
  endfunction

  function automatic int apod(int x, int w);
    longint y;
    y = (longint'(x) * w) >>> 7;
    if (y > 8191) y = 8191;
    if (y < -8192) y = -8192;
    return int'(y);
  endfunction

  function automatic int zone_of(int fp, int zb1, int zb2);
    return (fp < zb1) ? 0 : (fp < zb2) ? 1 : 2;
  endfunction

  // Integer sample index of every focal point 0 .. n_fp-1.
  function automatic void ref_idx(dcoef_t c, int n_fp, ref int idx[]);
    longint pos, dj, j;
    int s;
    idx = new[n_fp];
    pos = longint'(c.start);
    s = 0; j = 0;
    for (int n = 0; n < n_fp; n++) begin
      idx[n] = int'(pos >> 16);
      dj = longint'(c.sect[s].d0) + j * longint'(c.sect[s].e0) + longint'(c.sect[s].f) * j * (j - 1) / 2;
      pos = pos + (dj >>> c.sect[s].shift);
      j++;
      if (s < N_SECT - 1 && j == longint'(c.sect[s].len)) begin s++; j = 0; end
    end
  endfunction

  // Random coefficient set whose advance per focal point is between 1 and ~6 samples.
  function automatic dcoef_t gen_coef(int n_fp, int max_start);
    dcoef_t c;
    bit ok;
    int left;
    do begin
      c = '0;
      c.start = ($urandom % (max_start + 1)) << 16 | ($urandom & 16'hffff);
      left = n_fp;
      for (int s = 0; s < N_SECT; s++) begin
        int k, er, fr;
        k = $urandom % 4;
        c.sect[s].shift = 4'(k);
        c.sect[s].len   = FP_W'(1 + $urandom % (n_fp / 2 + 1));
        c.sect[s].d0    = (32'sd1 <<< (16 + k)) + 32'(($urandom % 3) << (16 + k)) + 32'($urandom % (1 << (16 + k)));
        // first and second differences scaled so that the increment drifts by at
        // most about one sample over the scanline
        er = (1 << (16 + k)) / n_fp + 1;
        fr = (1 << (17 + k)) / (n_fp * n_fp) + 1;
        c.sect[s].e0    = 32'(int'($urandom % (2 * er)) - er);
        c.sect[s].f     = 32'(int'($urandom % (2 * fr)) - fr);
      end
      ok = 1;
      begin
        longint dj, j; int s;
        s = 0; j = 0;
        for (int n = 0; n < n_fp; n++) begin
          dj = longint'(c.sect[s].d0) + j * longint'(c.sect[s].e0) + longint'(c.sect[s].f) * j * (j - 1) / 2;
          if ((dj >>> c.sect[s].shift) < (64'sd1 <<< 16) || (dj >>> c.sect[s].shift) > (64'sd6 <<< 16)
              || dj > 64'sh3fffffff) ok = 0;
          j++;
          if (s < N_SECT - 1 && j == longint'(c.sect[s].len)) begin s++; j = 0; end
        end
      end
    end while (!ok);
    return c;
  endfunction

  // Coefficient set of a neighbouring scanline: same sections, start up to 3 samples
  // later and each increment larger by up to 1/max(64, n_fp) sample, so the two
  // drift apart by at most about one sample over the scanline.
  function automatic dcoef_t gen_near(dcoef_t b, int n_fp);
    dcoef_t c;
    int r;
    c = b;
    c.start = b.start + (($urandom % 4) << 16);
    for (int s = 0; s < N_SECT; s++) begin
      r = (1 << (16 + int'(b.sect[s].shift))) / ((n_fp > 64) ? n_fp : 64);
      c.sect[s].d0 = b.sect[s].d0 + 32'($urandom % r);
    end
    return c;
  endfunction

  // Configuration word number i (numbering of sm3d_pkg) of a coefficient set.
  function automatic logic [31:0] cfg_word(dcoef_t c, int i, apod_t w [N_ZONE]);
    if (i == 0) return c.start;
    if (i >= CFG_APOD0) return 32'(w[i - CFG_APOD0]);
    case ((i - 1) % 5)
      0: return 32'(c.sect[(i-1)/5].len);
      1: return c.sect[(i-1)/5].d0;
      2: return c.sect[(i-1)/5].e0;
      3: return c.sect[(i-1)/5].f;
      default: return 32'(c.sect[(i-1)/5].shift);
    endcase
  endfunction
endpackage
