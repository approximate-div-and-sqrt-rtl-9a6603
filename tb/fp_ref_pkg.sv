// Reference model for the division / square-root testbenches.
//
// Computes IEEE-754 division and square root for a binary format with ce
// exponent and cm fraction bits (operands of up to 32 bits), rounded to
// nearest-even at p fraction bits, with the RISC-V special-case rules
// (canonical quiet NaN, invalid / divide-by-zero flags).  It works on wide
// integers: the quotient comes from a 128-bit integer division and the root
// from a binary search, so it shares no algorithm with the hardware.
// Flags are returned as {nv, dz, of, uf, nx}; underflow is "tiny before
// rounding and inexact".
package fp_ref_pkg;

  function automatic int msb128(logic [127:0] v);
    for (int i = 127; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  // Round sign * (m * 2^e), plus a sticky fraction below m, to the format.
  function automatic void round_pack(input logic sgn, input logic [127:0] m, input int e,
                                     input bit sticky_in, input int ce, input int cm,
                                     input int p, output logic [31:0] res,
                                     output logic [4:0] fl);
    int bias = (1 << (ce - 1)) - 1;
    int maxe = (1 << ce) - 1;
    int k, ev, l, sh, kr, er;
    bit tiny, g, s, up;
    logic [127:0] r, frac, mask;
    k  = msb128(m);
    ev = k + e;
    tiny = ev < 1 - bias;
    l  = (tiny ? (1 - bias) : ev) - p;
    sh = l - e;
    fl = '0;
    if (sh >= 128) begin
      r = '0; g = 0; s = (m != 0) || sticky_in;
    end else if (sh <= 0) begin
      r = m << (-sh); g = 0; s = sticky_in;
    end else begin
      r = m >> sh;
      g = m[sh-1];
      s = sticky_in;
      for (int i = 0; i < sh - 1; i++) if (m[i]) s = 1;
    end
    up = g && (s || r[0]);
    r  = r + 128'(up);
    fl[0] = g || s;
    fl[1] = tiny && (g || s);
    mask = (128'(1) << cm) - 1;
    if (r == 0) begin
      res = 32'(sgn) << (ce + cm);
      return;
    end
    kr = msb128(r);
    er = kr + l;
    if (er >= 1 - bias) begin
      if (er + bias >= maxe) begin
        res = (32'(sgn) << (ce + cm)) | (32'(maxe) << cm);
        fl[2] = 1; fl[0] = 1;
        return;
      end
      if (kr > cm) frac = (r >> (kr - cm)) & mask;
      else         frac = (r << (cm - kr)) & mask;
      res = (32'(sgn) << (ce + cm)) | (32'(er + bias) << cm) | 32'(frac);
    end else begin
      res = (32'(sgn) << (ce + cm)) | 32'(r << (cm - p));
    end
  endfunction

  function automatic void ref_op(input bit is_sqrt, input logic [31:0] a, input logic [31:0] b,
                                 input int ce, input int cm, input int p,
                                 output logic [31:0] res, output logic [4:0] fl);
    int bias = (1 << (ce - 1)) - 1;
    int maxe = (1 << ce) - 1;
    logic sa, sb;
    int ea, eb, e_a, e_b;
    logic [127:0] ma, mb, n, q, x, lo, hi, mid;
    bit za, zb, ia, ib, na, nb, sna, snb;
    logic [31:0] qnan;
    sa = a[ce+cm]; sb = b[ce+cm];
    ea = int'((a >> cm) & ((1 << ce) - 1));
    eb = int'((b >> cm) & ((1 << ce) - 1));
    ma = 128'(a & ((32'd1 << cm) - 1));
    mb = 128'(b & ((32'd1 << cm) - 1));
    za = (ea == 0) && (ma == 0);  zb = (eb == 0) && (mb == 0);
    ia = (ea == maxe) && (ma == 0); ib = (eb == maxe) && (mb == 0);
    na = (ea == maxe) && (ma != 0); nb = (eb == maxe) && (mb != 0);
    sna = na && !ma[cm-1]; snb = nb && !mb[cm-1];
    qnan = (32'(maxe) << cm) | (32'd1 << (cm - 1));
    fl = '0;
    if (ea == 0) e_a = 1 - bias - cm; else begin e_a = ea - bias - cm; ma[cm] = 1'b1; end
    if (eb == 0) e_b = 1 - bias - cm; else begin e_b = eb - bias - cm; mb[cm] = 1'b1; end
    if (is_sqrt) begin
      if (na || (sa && !za)) begin res = qnan; fl[4] = sna || !na; return; end
      if (ia) begin res = 32'(maxe) << cm; return; end
      if (za) begin res = 32'(sa) << (ce + cm); return; end
      if ((e_a % 2) != 0) begin ma = ma << 1; e_a = e_a - 1; end
      x = ma << 80;
      lo = 0; hi = 128'(1) << 60;
      while (hi - lo > 1) begin
        mid = (lo + hi) >> 1;
        if (mid * mid <= x) lo = mid; else hi = mid;
      end
      round_pack(1'b0, lo, (e_a - 80) / 2, (lo * lo) != x, ce, cm, p, res, fl);
    end else begin
      if (na || nb || (za && zb) || (ia && ib)) begin
        res = qnan; fl[4] = sna || snb || !(na || nb); return;
      end
      if (ia || zb) begin
        res = (32'(sa ^ sb) << (ce + cm)) | (32'(maxe) << cm); fl[3] = zb && !ia; return;
      end
      if (za || ib) begin res = 32'(sa ^ sb) << (ce + cm); return; end
      n = ma << 64;
      q = n / mb;
      round_pack(sa ^ sb, q, e_a - e_b - 64, (n % mb) != 0, ce, cm, p, res, fl);
    end
  endfunction

  // Random operand of the format, biased towards the interesting classes.
  function automatic logic [31:0] rand_op(input int ce, input int cm);
    int maxe = (1 << ce) - 1;
    logic [31:0] s, e, f;
    int sel = $urandom_range(0, 99);
    s = 32'($urandom_range(0, 1));
    f = $urandom & ((32'd1 << cm) - 1);
    if (sel < 55)      e = 32'($urandom_range(1, maxe - 1));
    else if (sel < 70) e = 0;                                     // denormal (or zero)
    else if (sel < 80) e = 32'($urandom_range(0, 1)) ? 32'($urandom_range(1, 4))
                                                      : 32'($urandom_range(maxe - 4, maxe - 1));
    else if (sel < 85) begin e = 0; f = 0; end                     // zero
    else if (sel < 90) begin e = 32'(maxe); f = 0; end             // infinity
    else if (sel < 93) begin e = 32'(maxe); f = f | 1; end         // NaN
    else               e = 32'((1 << (ce - 1)) - 1 + $urandom_range(0, 2) - 1);   // near 1.0
    return (s << (ce + cm)) | (e << cm) | f;
  endfunction

endpackage
