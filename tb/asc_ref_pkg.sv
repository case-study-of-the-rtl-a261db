// asc_ref_pkg: reference arithmetic for the testbenches, written directly on
// integers (no pipeline structure): hexadecimal floating add / multiply /
// normalize with the truncating rules of the pipe, compares and shifts.
package asc_ref_pkg;
  typedef struct {
    bit          s;
    int          e;      // biased exponent
    bit [63:0]   f;      // fraction, 56 bits used
  } rf_t;

  function automatic rf_t rf_unpack(bit [63:0] w);
    rf_t r;
    r.s = w[63]; r.e = int'(w[62:56]); r.f = {8'h0, w[55:0]};
    return r;
  endfunction

  function automatic rf_t rf_zero();
    rf_t r;
    r.s = 0; r.e = 0; r.f = 0;
    return r;
  endfunction

  function automatic bit [63:0] rf_pack(rf_t r);
    return {r.s, r.e[6:0], r.f[55:0]};
  endfunction

  // normalize a magnitude of up to 57 bits
  function automatic rf_t rf_norm(bit s, int e, bit [63:0] m);
    rf_t r;
    if (m == 0) return rf_zero();
    if (m >= 64'h0100_0000_0000_0000) begin m = m >> 4; e = e + 1; end
    while (m < 64'h0010_0000_0000_0000) begin m = m << 4; e = e - 1; end
    if (e < 0) return rf_zero();
    r.s = s; r.e = e; r.f = m;
    return r;
  endfunction

  function automatic rf_t rf_add(rf_t x, rf_t y);
    rf_t l, sm;
    int d;
    bit [63:0] sf, m;
    bit s;
    if (y.e > x.e) begin l = y; sm = x; end else begin l = x; sm = y; end
    d  = l.e - sm.e;
    if (d > 14) d = 14;
    sf = sm.f >> (4 * d);
    if (l.s == sm.s) begin m = l.f + sf; s = l.s; end
    else if (l.f >= sf) begin m = l.f - sf; s = l.s; end
    else begin m = sf - l.f; s = sm.s; end
    return rf_norm(s, l.e, m);
  endfunction

  // unnormalized product of two 32-bit floating numbers
  function automatic rf_t rf_prod(bit [31:0] a, bit [31:0] b);
    rf_t r;
    bit [63:0] p;
    p   = 64'(a[23:0]) * 64'(b[23:0]);
    r.s = a[31] ^ b[31];
    r.e = int'(a[30:24]) + int'(b[30:24]) - 64;
    r.f = p << 8;
    return r;
  endfunction

  function automatic bit [63:0] rf_fad(bit [63:0] a, bit [63:0] b, bit sub);
    rf_t y;
    y = rf_unpack(b);
    y.s ^= sub;
    return rf_pack(rf_add(rf_unpack(a), y));
  endfunction

  function automatic bit [63:0] rf_fmp(bit [63:0] a, bit [63:0] b);
    rf_t p;
    p = rf_prod(a[31:0], b[31:0]);
    return rf_pack(rf_norm(p.s, p.e, p.f));
  endfunction

  // 0 equal, 1 less, 2 greater
  function automatic bit [1:0] cmp_fix(bit [63:0] a, bit [63:0] b);
    if (a == b) return 0;
    return ($signed(a) < $signed(b)) ? 2'd1 : 2'd2;
  endfunction

  function automatic real rf_real(bit [63:0] w);
    real v;
    int  e;
    v = $itor(w[55:32]) * 4294967296.0 + $itor(w[31:0]);
    e = int'(w[62:56]) - 64 - 14;
    while (e > 0) begin v = v * 16.0; e--; end
    while (e < 0) begin v = v / 16.0; e++; end
    return w[63] ? -v : v;
  endfunction

  function automatic bit [1:0] cmp_flt(bit [63:0] a, bit [63:0] b);
    real x, y;
    x = (a[55:0] == 0) ? 0.0 : rf_real(a);
    y = (b[55:0] == 0) ? 0.0 : rf_real(b);
    if (x == y) return 0;
    return (x < y) ? 2'd1 : 2'd2;
  endfunction

  function automatic bit [63:0] shift_ref(bit [63:0] v, int n, bit left, int kind);
    // kind 0 logical, 1 arithmetic, 2 circular
    bit [63:0] r;
    r = v;
    if (n > 64) n = 64;
    for (int i = 0; i < n; i++) begin
      if (left) r = (kind == 2) ? {r[62:0], r[63]} : {r[62:0], 1'b0};
      else      r = (kind == 2) ? {r[0], r[63:1]} : (kind == 1) ? {r[63], r[63:1]} : {1'b0, r[63:1]};
    end
    return r;
  endfunction

  function automatic bit [63:0] rand_flt64(int emin, int emax);
    bit [63:0] w;
    w[63]    = $urandom_range(1, 0);
    w[62:56] = 7'($urandom_range(emax, emin));
    w[55:0]  = {$urandom(), $urandom()};
    if (w[55:52] == 0) w[52] = 1;
    return w;
  endfunction

  function automatic bit [63:0] rand_flt32(int emin, int emax);
    bit [63:0] w;
    w = '0;
    w[31]    = $urandom_range(1, 0);
    w[30:24] = 7'($urandom_range(emax, emin));
    w[23:0]  = 24'($urandom());
    if (w[23:20] == 0) w[20] = 1;
    return w;
  endfunction
endpackage
