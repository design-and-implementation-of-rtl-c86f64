// tb_csd4: checks the 4-bit CSD slice.
// Part 1: every 4-bit two's complement value, converted on its own (nothing
// below, sign extension above): the digits must add up to the value, no two
// adjacent digits may be nonzero, and the digits must equal the non-adjacent
// form computed arithmetically. Part 2: every combination of the slice's 7
// inputs against a bit-serial software model of the recurrence, including
// gamma out.
module tb_csd4;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  logic [3:0] a;
  logic       a_below, a_above, g_in, g_out;
  logic [7:0] c;
  int checks = 0, failures = 0;

  csd4 dut (.a, .a_below, .a_above, .g_in, .g_out, .c);

  function automatic int dig(input logic [1:0] d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : (d == 2'b00) ? 0 : 99;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // part 1
    for (int v = -8; v < 8; v++) begin
      int sum;
      bit adj;
      longint unsigned pos, neg;
      a = 4'(v); a_below = 0; a_above = a[3]; g_in = 0;
      #1;
      sum = 0; adj = 0;
      for (int k = 0; k < 4; k++) begin
        sum += dig(c[2*k +: 2]) * (1 << k);
        if (k > 0 && dig(c[2*k +: 2]) != 0 && dig(c[2*k-2 +: 2]) != 0) adj = 1;
      end
      // NAF of the value taken modulo 16 (low 4 digits agree for v >= 0;
      // for v < 0 use 16 + v and drop the carry digit at weight 16)
      naf(longint'(v < 0 ? v + 16 : v), pos, neg);
      checks++;
      if (sum != v || adj) begin
        failures++;
        $display("FAIL value v=%0d c=%b sum=%0d adj=%b", v, c, sum, adj);
      end
      checks++;
      for (int k = 0; k < 4; k++) begin
        int e;
        e = pos[k] ? 1 : neg[k] ? -1 : 0;
        if (k == 3 && v < 0 && pos[4] == 1'b0 && neg[3] == 1'b0 && pos[3]) e = -1;
        if (dig(c[2*k +: 2]) != e && !(k == 3 && v < 0)) begin
          failures++;
          $display("FAIL naf v=%0d digit %0d got %0d expected %0d", v, k, dig(c[2*k +: 2]), e);
        end
      end
    end
    // part 2
    for (int i = 0; i < 128; i++) begin
      logic [5:0] ax;
      bit g;
      logic [7:0] exp_c;
      {a_above, a, a_below, g_in} = 7'(i);
      #1;
      ax = {a_above, a, a_below};
      g  = g_in;
      for (int k = 0; k < 4; k++) begin
        g = !g && (ax[k+1] ^ ax[k]);
        exp_c[2*k +: 2] = !g ? 2'b00 : ax[k+2] ? 2'b11 : 2'b01;
      end
      checks++;
      if (c !== exp_c || g_out !== g) begin
        failures++;
        $display("FAIL in=%b c=%b exp=%b g_out=%b exp=%b", 7'(i), c, exp_c, g_out, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
