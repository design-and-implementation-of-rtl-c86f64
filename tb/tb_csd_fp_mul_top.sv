// tb_csd_fp_mul_top: end-to-end test of the whole design at its default
// parameters (Q10.9 fixed point, single-precision float).
// Operations alternate at random between the fixed-point path (fa * fb,
// converted to float, multiplied, converted back) and the float path
// (a * b). Expected values: fixed operands are turned into floats by exact
// arithmetic, multiplied by fp_ref_pkg::ref_fmul, and the product converted
// to Q10.9 by fp_ref_pkg::ref_f2fix. Every result must arrive exactly 3
// cycles after its operands. The mechanisms counted, each required at least
// once: fixed-point mode, float mode, a mode switch between back-to-back
// operations, rounding up, rounding carry, float overflow, underflow, NaN,
// infinity, zero, denormal operand, denormal result, fixed-point saturation, fixed-point NaN,
// an idle cycle in the stream.
module tb_csd_fp_mul_top;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  localparam int LATENCY = 3;
  localparam int NOPS = 30000;

  logic        clk = 0, rst_n = 0, in_valid = 0, in_fixed = 0;
  logic [19:0] fa = '0, fb = '0, fy;
  float32_t    a = '0, b = '0, y;
  fp_flags_t   flags;
  logic        out_valid, fy_ovf, fy_inv;
  int checks = 0, failures = 0, cycle = 0, issued = 0, received = 0;

  typedef enum int { M_FIX, M_FLT, M_SWITCH, M_RUP, M_CARRY, M_OVF, M_UNF, M_NAN, M_INF,
                     M_ZERO, M_DEN, M_SUB, M_SAT, M_FINV, M_IDLE, M_COUNT } mech_e;
  int mech [M_COUNT];
  string mname [M_COUNT] = '{"fixed", "float", "switch", "round_up", "carry", "ovf", "unf",
                             "nan", "inf", "zero", "denorm", "denorm_result", "fix_sat", "fix_nan", "idle"};

  typedef struct { ref_res_t r; longint fx; bit fovf, finv; int due; logic [31:0] a, b; } pend_t;
  pend_t q[$];

  csd_fp_mul_top dut (.clk, .rst_n, .in_valid, .in_fixed, .fa, .fb, .a, .b,
                      .out_valid, .y, .flags, .fy, .fy_ovf, .fy_inv);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #(10 * (NOPS * 2 + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact single-precision value of a Q10.9 code
  function automatic logic [31:0] fix_to_float(input logic [19:0] v);
    longint k;
    longint unsigned m;
    int lead;
    k = longint'(signed'(v));
    if (k == 0) return 32'h0;
    m = (k < 0) ? longint'(-k) : longint'(k);
    lead = 63;
    while (!m[lead]) lead--;
    return {k < 0, 8'(lead - 9 + 127), 23'(m << (23 - lead))};
  endfunction

  function automatic logic [31:0] rand_float();
    logic [31:0] v;
    int k;
    v = $urandom;
    k = $urandom_range(19);
    if (k == 0) v[30:23] = 8'h00;                       // zero / denormal
    else if (k == 1) v[30:23] = 8'hFF;                  // inf / NaN
    else if (k == 2) v[22:0] = 23'h0;
    else if (k < 6) v[30:23] = 8'($urandom_range(254, 190));
    else if (k < 9) v[30:23] = 8'($urandom_range(64, 1));
    else v[30:23] = 8'($urandom_range(150, 104));
    if (k == 1 && $urandom_range(1) == 0) v[22:0] = 23'h0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        received++;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected out_valid at cycle %0d", cycle);
        end else begin
          pend_t p;
          p = q.pop_front();
          if (p.due != cycle || y !== p.r.y || flags !== p.r.flags ||
              fy !== 20'(p.fx) || fy_ovf !== p.fovf || fy_inv !== p.finv) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h y=%h fl=%b fy=%h %b%b cyc %0d / exp %h %b %h %b%b cyc %0d",
                       p.a, p.b, y, flags, fy, fy_ovf, fy_inv, cycle,
                       p.r.y, p.r.flags, 20'(p.fx), p.fovf, p.finv, p.due);
          end else begin
            if (p.r.flags == 0 && p.r.rnd_up) mech[M_RUP]++;
            if (p.r.flags == 0 && p.r.rnd_carry) mech[M_CARRY]++;
            if (flags.ovf)  mech[M_OVF]++;
            if (flags.unf)  mech[M_UNF]++;
            if (flags.nan)  mech[M_NAN]++;
            if (flags.inf)  mech[M_INF]++;
            if (flags.zero) mech[M_ZERO]++;
            if (flags == 5'b00001) mech[M_SUB]++;
            if (fy_ovf)     mech[M_SAT]++;
            if (fy_inv)     mech[M_FINV]++;
            if ((p.a[30:23] == 0 && p.a[22:0] != 0) || (p.b[30:23] == 0 && p.b[22:0] != 0))
              mech[M_DEN]++;
          end
        end
      end else if (q.size() != 0 && q[0].due == cycle) begin
        failures++;
        checks++;
        $display("FAIL missing result at cycle %0d", cycle);
      end
    end
  end

  initial begin
    automatic bit last_valid = 0, last_fixed = 0;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    while (issued < NOPS) begin
      int mode;
      logic [31:0] av, bv;
      mode = $urandom_range(99);
      if (mode < 8) begin
        in_valid = 0;
        mech[M_IDLE]++;
        last_valid = 0;
      end else begin
        pend_t p;
        in_fixed = (mode < 55);
        if (in_fixed) begin
          mech[M_FIX]++;
          fa = 20'($urandom);
          fb = 20'($urandom);
          if (mode < 30) begin                 // small magnitudes: product in range
            fa = 20'(int'($urandom_range(4000)) - 2000);
            fb = 20'(int'($urandom_range(4000)) - 2000);
          end
          av = fix_to_float(fa);
          bv = fix_to_float(fb);
          a = 32'($urandom);                   // unused float inputs keep moving
          b = 32'($urandom);
        end else begin
          mech[M_FLT]++;
          av = rand_float();
          bv = rand_float();
          if (mode > 95) begin
            av = {1'($urandom), 8'd127, 23'h000001};
            bv = {1'($urandom), 8'($urandom_range(140, 115)), 23'h7FFFFE};
          end
          a = av;
          b = bv;
          fa = 20'($urandom);
          fb = 20'($urandom);
        end
        if (last_valid && last_fixed != in_fixed) mech[M_SWITCH]++;
        last_valid = 1;
        last_fixed = in_fixed;
        in_valid = 1;
        p.r = ref_fmul(av, bv);
        p.fx = ref_f2fix(p.r.y, 20, 9, p.fovf, p.finv);
        p.due = cycle + LATENCY;
        p.a = av;
        p.b = bv;
        q.push_back(p);
        issued++;
      end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (received != issued || q.size() != 0) begin
      failures++;
      $display("FAIL issued %0d received %0d", issued, received);
    end
    foreach (mech[i]) begin
      $display("mechanism %-8s happened %0d times", mname[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mname[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
