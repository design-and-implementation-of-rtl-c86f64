// tb_float2fix: checks the single-precision to Q10.9 converter against a
// real-arithmetic model (round to nearest even, saturation, NaN gives 0).
// Stimulus: every fixed code converted to its exact float, the same codes
// plus and minus half an LSB (ties) and a quarter LSB, random floats over
// the whole exponent range, and the specials (zero, denormal, infinity,
// NaN, the largest and smallest codes and one step beyond).
module tb_float2fix;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  float32_t    f;
  logic [19:0] fx;
  logic        ovf, inv;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_inv = 0, n_tie = 0;

  float2fix dut (.f, .fx, .ovf, .inv);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact float of (k / 2^12) for a 32-bit signed k, k != 0
  function automatic logic [31:0] to_float(input longint k, input int frac);
    longint unsigned m;
    int lead;
    logic [31:0] r;
    m = (k < 0) ? longint'(-k) : longint'(k);
    lead = 63;
    while (!m[lead]) lead--;
    r[31]    = (k < 0);
    r[30:23] = 8'(lead - frac + 127);
    r[22:0]  = 23'((m << (23 - lead)));
    return r;
  endfunction

  task automatic check_one(input logic [31:0] v);
    longint want;
    bit wovf, winv;
    f = v;
    #1;
    want = ref_f2fix(v, 20, 9, wovf, winv);
    checks++;
    if (fx !== 20'(want) || ovf !== wovf || inv !== winv) begin
      failures++;
      if (failures < 10) $display("FAIL f=%h fx=%h ovf=%b inv=%b expected %h %b %b",
                                  v, fx, ovf, inv, 20'(want), wovf, winv);
    end
    n_ovf += int'(ovf);
    n_inv += int'(inv);
  endtask

  initial begin
    check_one(32'h0000_0000);
    check_one(32'h8000_0000);
    check_one(32'h0000_0123);    // denormal
    check_one(32'h7F80_0000);
    check_one(32'hFF80_0000);
    check_one(32'h7FC0_0000);
    check_one(32'hFFFF_FFFF);
    for (int k = -(1 << 19) - 3; k < (1 << 19) + 3; k += 7) begin
      if (k != 0) begin
        check_one(to_float(longint'(k) * 8, 12));      // exact code
        check_one(to_float(longint'(k) * 8 + 4, 12));  // tie
        check_one(to_float(longint'(k) * 8 - 2, 12));  // quarter below
        n_tie++;
      end
    end
    for (int i = 0; i < 50000; i++) check_one($urandom);
    for (int i = 0; i < 50000; i++) check_one({1'($urandom), 8'($urandom_range(150, 100)), 23'($urandom)});
    $display("ovf=%0d inv=%0d ties=%0d", n_ovf, n_inv, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
