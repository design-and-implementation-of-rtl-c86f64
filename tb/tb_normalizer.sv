// tb_normalizer: checks normalization, rounding and the special cases.
// Stimulus: random normal significand pairs and exponent sums chosen to hit
// in-range results, overflow, underflow and the edges of both; products that
// need no shift and products that need one; significands just below a
// power of two so that rounding carries; exact ties; and every pair of
// operand classes. The expected result is computed by fp_ref_pkg::ref_norm.
// Products of any size (as denormal operands give) are also normalized,
// with exponent sums deep in the denormal range. Each mechanism (rounding
// up, rounding carry, overflow, underflow, denormal result, a denormal that
// rounds up to the smallest normal, NaN, infinity, zero, denormal operand)
// must occur at least once.
module tb_normalizer;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  logic                     s;
  logic signed [EXPS_W-1:0] e;
  logic [PROD_W-1:0]        prod;
  fp_class_e                cls_a, cls_b;
  float32_t                 y;
  fp_flags_t                flags;
  int checks = 0, failures = 0;
  int n_rup = 0, n_carry = 0, n_ovf = 0, n_unf = 0, n_nan = 0, n_inf = 0, n_zero = 0, n_den = 0;
  int n_sub = 0, n_tomin = 0;

  normalizer dut (.s, .e, .prod, .cls_a, .cls_b, .y, .flags);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input bit sv, input int ev, input logic [23:0] sa, input logic [23:0] sb,
                           input fp_class_e ca, input fp_class_e cb);
    check_p(sv, ev, longint'(sa) * longint'(sb), ca, cb);
  endtask

  task automatic check_p(input bit sv, input int ev, input longint unsigned p,
                         input fp_class_e ca, input fp_class_e cb);
    ref_res_t r;
    bit za, zb;
    s = sv; e = 10'(ev); prod = 48'(p); cls_a = ca; cls_b = cb;
    #1;
    za = (ca == CLS_ZERO);
    zb = (cb == CLS_ZERO);
    r = ref_norm(sv, ev, p, za, zb, ca == CLS_NAN, cb == CLS_NAN, ca == CLS_INF, cb == CLS_INF);
    checks++;
    if (y !== r.y || flags !== r.flags) begin
      failures++;
      if (failures < 10)
        $display("FAIL e=%0d p=%h cls=%0d/%0d y=%h flags=%b expected %h %b",
                 ev, p, ca, cb, y, flags, r.y, r.flags);
    end
    if (flags == r.flags && y == r.y) begin
      if (r.flags == 0 && r.rnd_up) n_rup++;
      if (r.flags == 0 && r.rnd_carry) n_carry++;
      n_ovf  += int'(flags.ovf);
      n_unf  += int'(flags.unf);
      n_nan  += int'(flags.nan);
      n_inf  += int'(flags.inf);
      n_zero += int'(flags.zero);
      if (ca == CLS_DENORM || cb == CLS_DENORM) n_den++;
      if (flags == 5'b00001) n_sub++;
      if (r.flags == 0 && y[30:23] == 8'd1 && y[22:0] == 0 && e < 1) n_tomin++;
    end
  endtask

  initial begin
    static fp_class_e cl [5] = '{CLS_ZERO, CLS_DENORM, CLS_NORMAL, CLS_INF, CLS_NAN};
    // every class pair
    foreach (cl[i]) foreach (cl[j]) check_one(1'($urandom), 100, 24'hC00000, 24'hC00000, cl[i], cl[j]);
    // rounding carry: 0x800001 * 0xFFFFFE rounds up to 2^47
    check_one(0, 127, 24'h800001, 24'hFFFFFE, CLS_NORMAL, CLS_NORMAL);
    check_one(1, 253, 24'h800001, 24'hFFFFFE, CLS_NORMAL, CLS_NORMAL);  // carry into overflow
    // exponent edges
    for (int ev = -3; ev <= 3; ev++)
      check_one(0, ev, 24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000, CLS_NORMAL, CLS_NORMAL);
    for (int ev = 251; ev <= 256; ev++)
      check_one(1, ev, 24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000, CLS_NORMAL, CLS_NORMAL);
    check_one(0, 254, 24'hFFFFFF, 24'hFFFFFF, CLS_NORMAL, CLS_NORMAL);
    check_one(0, 0, 24'hFFFFFF, 24'hFFFFFF, CLS_NORMAL, CLS_NORMAL);
    // exact tie: 0x800001 * 0x800001 = 2^46 + 2^24 + 1 -> not tie; use
    // 0x800003 * 0x800000 which is exact, and 0xC00001 * 0xAAAAAB etc.
    check_one(0, 127, 24'h800001, 24'h800000, CLS_NORMAL, CLS_NORMAL);
    check_one(0, 127, 24'h800003, 24'hC00000, CLS_NORMAL, CLS_NORMAL);   // tie, odd lsb
    check_one(0, 127, 24'h800001, 24'hC00000, CLS_NORMAL, CLS_NORMAL);   // tie, even lsb
    // random exact ties: 1.5 * an odd significand below 0xAAAAAB leaves
    // exactly the guard bit set below the kept 24 bits
    for (int i = 0; i < 2000; i++)
      check_one(1'($urandom), 127, 24'hC00000, 24'($urandom_range(24'hAAAAAA, 24'h800001)) | 24'h1,
                CLS_NORMAL, CLS_NORMAL);
    // products of any size (denormal operands), exponents reaching deep
    // into the denormal range
    for (int i = 0; i < 30000; i++) begin
      longint unsigned pr;
      pr = {$urandom, $urandom} >> (16 + $urandom_range(47));
      if (pr == 0) pr = 1;
      check_p(1'($urandom), int'($urandom_range(260)) - 200, pr,
              ($urandom_range(1) == 0) ? CLS_DENORM : CLS_NORMAL, CLS_NORMAL);
    end
    // denormal results that round up to the smallest normal: a product of
    // 2^48 - 1 at exponent sum -1 lies just below 2^-126
    check_p(0, -1, 64'h0000_FFFF_FFFF_FFFF, CLS_NORMAL, CLS_NORMAL);
    check_p(1, -1, 64'h0000_FFFF_FF00_0000, CLS_NORMAL, CLS_NORMAL);
    for (int i = 0; i < 30000; i++)
      check_one(1'($urandom), $urandom_range(300) - 40,
                24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000, CLS_NORMAL, CLS_NORMAL);
    $display("mechanisms: round_up=%0d carry=%0d ovf=%0d unf=%0d nan=%0d inf=%0d zero=%0d denorm=%0d denorm_result=%0d to_min_normal=%0d",
             n_rup, n_carry, n_ovf, n_unf, n_nan, n_inf, n_zero, n_den, n_sub, n_tomin);
    if (n_sub == 0 || n_tomin == 0 || n_rup == 0 || n_carry == 0 || n_ovf == 0 || n_unf == 0 || n_nan == 0 || n_inf == 0 ||
        n_zero == 0 || n_den == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
