// fp_ref_pkg: reference models used by the testbenches.
//
// Written from the arithmetic definitions, not from the RTL: the significand
// product uses the '*' operator on 64-bit integers, rounding is done by
// comparing the discarded remainder with one half, the CSD digits come from
// the non-adjacent-form identity n = ((3n) >> 1 ^ n >> 1) split into plus and
// minus masks, and the fixed-point conversions go through real arithmetic.
// Rules modelled: round to nearest even, denormal operands and results
// (gradual underflow), overflow gives infinity, NaN and infinity * zero give
// 7FC00000. Flags {nan, inf, zero, ovf, unf}: unf marks a denormal or
// rounded-to-zero result of nonzero operands.
package fp_ref_pkg;

  typedef struct {
    logic [31:0] y;
    logic [4:0]  flags;   // {nan, inf, zero, ovf, unf}
    bit          rnd_up;  // rounding incremented the significand
    bit          rnd_carry; // rounding carried into the exponent
  } ref_res_t;

  // Non-adjacent form (the CSD) of n >= 0: pos/neg masks of +1 / -1 digits.
  function automatic void naf(input longint unsigned n, output longint unsigned pos,
                              output longint unsigned neg);
    longint unsigned h, x3, c;
    h   = n >> 1;
    x3  = n + h;
    c   = h ^ x3;
    pos = x3 & c;
    neg = h & c;
  endfunction

  // Round, range-check and special-case a raw product.
  //   sp, ep: sign and exponent sum ea'+eb'-127 (denormals count as
  //   exponent 1); p: significand product (any value, not only normalized)
  //   za/zb, na/nb, ia/ib: zero, NaN, infinity of each operand
  // The value is p * 2^(ep - 127 - 46). The result quantum is 2^(E-150) for a
  // normal result with exponent E and 2^-149 for a denormal one; p is divided
  // by the quantum and the quotient rounded by comparing the remainder with
  // half the divisor.
  function automatic ref_res_t ref_norm(input bit sp, input int ep, input longint unsigned p,
                                        input bit za, input bit zb, input bit na, input bit nb,
                                        input bit ia, input bit ib);
    ref_res_t r;
    int n, sh, ex;
    bit denorm;
    longint unsigned q, rem, half;
    r = '{y: 32'h0, flags: 5'b0, rnd_up: 0, rnd_carry: 0};
    if (na || nb || ((ia || ib) && (za || zb))) begin
      r.y = 32'h7FC0_0000; r.flags = 5'b10000; return r;
    end
    if (ia || ib) begin
      r.y = {sp, 8'hFF, 23'h0}; r.flags = 5'b01000; return r;
    end
    if (za || zb || p == 0) begin
      r.y = {sp, 31'h0}; r.flags = 5'b00100; return r;
    end
    n = 63;
    while (n > 0 && p[n] == 1'b0) n--;
    ex = ep + (n - 46);               // exponent of the leading one
    denorm = (ex < 1);
    sh = denorm ? (n - 23 + (1 - ex)) : (n - 23);
    if (sh <= 0) begin
      q = p << (-sh);
    end else if (sh > 48) begin
      q = 0;                          // p < 2^48 <= half the quantum
    end else begin
      q    = p >> sh;
      rem  = p - (q << sh);
      half = 64'd1 << (sh - 1);
      if (rem > half || (rem == half && q[0])) begin
        q++;
        r.rnd_up = 1;
      end
    end
    if (!denorm) begin
      if (q == (64'd1 << 24)) begin
        q = q >> 1;
        ex++;
        r.rnd_carry = 1;
      end
      if (ex >= 255) begin
        r.y = {sp, 8'hFF, 23'h0}; r.flags = 5'b01010;
      end else begin
        r.y = {sp, ex[7:0], q[22:0]};
      end
    end else begin
      // q < 2^23 is a denormal; q == 2^23 is the smallest normal
      r.y = {sp, (q >= (64'd1 << 23)) ? 8'd1 : 8'd0, q[22:0]};
      if (q < (64'd1 << 23)) r.flags = (q == 0) ? 5'b00101 : 5'b00001;
    end
    return r;
  endfunction

  function automatic ref_res_t ref_fmul(input logic [31:0] a, input logic [31:0] b);
    longint unsigned sa, sb;
    bit za, zb, na, nb, ia, ib;
    int xa, xb;
    za = (a[30:0] == 31'h0);
    zb = (b[30:0] == 31'h0);
    na = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    nb = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    ia = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    ib = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    sa = {40'h0, a[30:23] != 0, a[22:0]};
    sb = {40'h0, b[30:23] != 0, b[22:0]};
    xa = (a[30:23] == 0) ? 1 : int'(a[30:23]);
    xb = (b[30:23] == 0) ? 1 : int'(b[30:23]);
    return ref_norm(a[31] ^ b[31], xa + xb - 127, sa * sb, za, zb, na, nb, ia, ib);
  endfunction

  function automatic real pow2(input int k);
    real r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  // Exact value of a finite single.
  function automatic real f2real(input logic [31:0] f);
    real v;
    if (f[30:23] == 0) v = (real'(f[22:0]) / 8388608.0) * pow2(-126);
    else v = (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
    return f[31] ? -v : v;
  endfunction

  // Float to fixed point with FRAC fraction bits in W bits: round to nearest
  // even, saturate. Returns {inv, ovf, value}.
  function automatic longint ref_f2fix(input logic [31:0] f, input int W, input int FRAC,
                                       output bit ovf, output bit inv);
    real r, fl, d;
    longint v, maxp, minn;
    maxp = (64'sd1 <<< (W - 1)) - 1;
    minn = -(64'sd1 <<< (W - 1));
    ovf = 0; inv = 0;
    if (f[30:23] == 8'hFF) begin
      if (f[22:0] != 0) begin inv = 1; return 0; end
      ovf = 1; return f[31] ? minn : maxp;
    end
    r = f2real(f) * pow2(FRAC);
    if (r > real'(maxp) + 1.0) begin ovf = 1; return maxp; end
    if (r < real'(minn) - 1.0) begin ovf = 1; return minn; end
    fl = $floor(r);
    d  = r - fl;
    v  = longint'(fl);
    if (d > 0.5 || (d == 0.5 && v[0])) v++;
    if (v > maxp) begin ovf = 1; return maxp; end
    if (v < minn) begin ovf = 1; return minn; end
    return v;
  endfunction

endpackage
