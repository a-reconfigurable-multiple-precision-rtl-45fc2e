// tb_ref_pkg: reference model for the dot product unit testbenches.
//
// Works on exact integers: every product is sigA * sigB * 2^(eA + eB - 2*bias
// - 2*F); a dot product is summed exactly in a 512-bit signed integer against
// the smallest product exponent, then rounded once with roundTiesToAway to
// the target format and packed the way the unit packs it (right-justified
// fields, +0 for a zero sum, flush to zero below the normal range, infinity at
// or above the all-ones exponent). Also holds random operand generators.
package tb_ref_pkg;

  typedef struct packed {
    logic        s;
    logic [10:0] e;
    logic [51:0] m;
  } res_t;

  typedef logic signed [511:0] big_t;

  function automatic int fbits(int p);   // 0: FP16, 1: FP32, 2: FP64
    return (p == 0) ? 10 : (p == 1) ? 23 : 52;
  endfunction
  function automatic int ebits(int p);
    return (p == 0) ? 5 : (p == 1) ? 8 : 11;
  endfunction
  function automatic int biasp(int p);
    return (1 << (ebits(p) - 1)) - 1;
  endfunction

  // Field extraction of a value of precision p held in the low bits of w
  function automatic logic sgn(int p, logic [63:0] w);
    return w[fbits(p) + ebits(p)];
  endfunction
  function automatic int expf(int p, logic [63:0] w);
    return int'((w >> fbits(p)) & ((64'd1 << ebits(p)) - 1));
  endfunction
  function automatic logic [52:0] sig(int p, logic [63:0] w);
    logic [52:0] f;
    f = 53'(w & ((64'd1 << fbits(p)) - 1));
    if (expf(p, w) != 0) f = f | (53'd1 << fbits(p));
    return f;
  endfunction
  function automatic int eeff(int p, logic [63:0] w);
    return (expf(p, w) == 0) ? 1 : expf(p, w);
  endfunction

  // Round (-1)^s * mag * 2^x to precision p and pack
  function automatic res_t round_ref(logic s, logic [511:0] mag, int x, int p);
    res_t        r;
    int          l, e, f, emax;
    logic [511:0] n;
    logic [53:0] m;
    r = '0;
    if (mag == '0) return r;
    f    = fbits(p);
    emax = (1 << ebits(p)) - 1;
    l    = 511;
    while (!mag[l]) l--;
    n = mag << (511 - l);
    m = '0;
    for (int i = 0; i < f; i++) m[f-1-i] = n[510-i];
    m[f] = 1'b1;
    m = m + 54'(n[510-f]);
    e = l + x + biasp(p);
    if (m[f+1]) begin
      e++;
      m = '0;
    end
    r.s = s;
    if (e >= emax) begin
      r.e = 11'(emax);
      r.m = '0;
    end else if (e <= 0) begin
      r.e = '0;
      r.m = '0;
    end else begin
      r.e = 11'(e);
      r.m = 52'(m) & ((52'd1 << f) - 1);
    end
    return r;
  endfunction

  // Exact dot product of n pairs of precision p, rounded to precision p
  function automatic res_t dot_ref(int p, logic [63:0] a [], logic [63:0] b [], int n);
    int   emin, sh;
    big_t acc, t;
    logic [511:0] mag;
    emin = 1 << 30;
    for (int i = 0; i < n; i++)
      if (eeff(p, a[i]) + eeff(p, b[i]) < emin) emin = eeff(p, a[i]) + eeff(p, b[i]);
    acc = '0;
    for (int i = 0; i < n; i++) begin
      sh = eeff(p, a[i]) + eeff(p, b[i]) - emin;
      t  = big_t'(sig(p, a[i])) * big_t'(sig(p, b[i]));
      t  = t <<< sh;
      if (sgn(p, a[i]) ^ sgn(p, b[i])) acc = acc - t;
      else                              acc = acc + t;
    end
    mag = (acc < 0) ? -acc : acc;
    // an exact zero gives +0; only for n == 1 can the sign matter (never zero here)
    if (n == 1)
      return round_ref(sgn(p, a[0]) ^ sgn(p, b[0]), mag, emin - 2*biasp(p) - 2*fbits(p), p);
    return round_ref(acc < 0, mag, emin - 2*biasp(p) - 2*fbits(p), p);
  endfunction

  // Random normal value of precision p with exponent field in [elo, ehi]
  function automatic logic [63:0] rnd_val(int p, int elo, int ehi);
    logic [63:0] f;
    int          e;
    f = {$urandom, $urandom};
    f = f & ((64'd1 << fbits(p)) - 1);
    e = elo + int'($urandom % 32'(ehi - elo + 1));
    return (64'($urandom & 1) << (fbits(p) + ebits(p))) | (64'(e) << fbits(p)) | f;
  endfunction

  // One test operation for the dot product unit: two beats of operand words,
  // the precision, and the expected rounded result.
  typedef struct {
    int           p;
    logic [159:0] a0, b0, a1, b1;
    res_t         r;
  } op_t;

  // kind: 0/1/2 random FP16/FP32/FP64; 3 FP16 sum that rounds up into the
  // next binade; 4 FP16 exact cancellation; 5/6 FP16 overflow/underflow;
  // 7/8 FP64 overflow/underflow.
  function automatic op_t make_op(int kind);
    op_t         o;
    logic [63:0] va [], vb [];
    int          n;
    o.p  = (kind == 1) ? 1 : (kind == 2 || kind == 7 || kind == 8) ? 2 : 0;
    n    = (o.p == 0) ? 20 : (o.p == 1) ? 5 : 1;
    va   = new[n];
    vb   = new[n];
    for (int k = 0; k < n; k++) begin
      case (kind)
        0: begin
             va[k] = rnd_val(0, 10, 16);
             vb[k] = rnd_val(0, 10, 16);
             if ($urandom % 20 == 0) va[k] = va[k] & 64'h83ff;  // subnormal
             if ($urandom % 20 == 0) vb[k] = 64'h0;            // zero
           end
        1: begin va[k] = rnd_val(1, 120, 126); vb[k] = rnd_val(1, 120, 126); end
        2: begin va[k] = rnd_val(2, 600, 1400); vb[k] = rnd_val(2, 600, 1400); end
        3: begin
             va[k] = (k == 0) ? 64'h3bff : (k == 1) ? 64'h2400 : 64'h0;
             vb[k] = (k == 0) ? 64'h3c00 : (k == 1) ? 64'h2400 : 64'h0;
           end
        4: begin
             if (k < 10) begin va[k] = rnd_val(0, 10, 16); vb[k] = rnd_val(0, 10, 16); end
             else begin va[k] = va[k-10] ^ 64'h8000; vb[k] = vb[k-10]; end
           end
        5: begin va[k] = rnd_val(0, 29, 30) & 64'h7fff; vb[k] = rnd_val(0, 29, 30) & 64'h7fff; end
        6: begin va[k] = rnd_val(0, 2, 4); vb[k] = rnd_val(0, 2, 4); end
        7: begin va[k] = rnd_val(2, 1900, 2000); vb[k] = rnd_val(2, 1900, 2000); end
        default: begin va[k] = rnd_val(2, 100, 200); vb[k] = rnd_val(2, 100, 200); end
      endcase
    end
    o.a0 = {5{$urandom, $urandom}};
    o.b0 = {5{$urandom, $urandom}};
    o.a1 = {5{$urandom, $urandom}};
    o.b1 = {5{$urandom, $urandom}};
    case (o.p)
      0: for (int k = 0; k < 10; k++) begin
           o.a0[16*k +: 16] = va[k][15:0];    o.b0[16*k +: 16] = vb[k][15:0];
           o.a1[16*k +: 16] = va[k+10][15:0]; o.b1[16*k +: 16] = vb[k+10][15:0];
         end
      1: for (int k = 0; k < 5; k++) begin
           o.a0[32*k +: 32] = va[k][31:0];    o.b0[32*k +: 32] = vb[k][31:0];
         end
      default: begin o.a0[63:0] = va[0]; o.b0[63:0] = vb[0]; end
    endcase
    o.r = dot_ref(o.p, va, vb, n);
    return o;
  endfunction

endpackage
