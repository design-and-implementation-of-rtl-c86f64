// tb_obcsd: exhaustive check of the One Bit CSD cell over all 16 input
// combinations. Expected: gamma_i = !gamma_{i-1} && (a_i != a_{i-1}); the
// digit is 0 when gamma_i is 0, otherwise -1 if a_{i+1} is 1 and +1 if it is 0,
// coded 00 / 11 / 01.
module tb_obcsd;
  import fp_csd_pkg::*;
  logic       a_prev, a_cur, a_next, g_in, g_out;
  csd_digit_t c;
  int checks = 0, failures = 0;

  obcsd dut (.a_prev, .a_cur, .a_next, .g_in, .g_out, .c);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      bit exp_g;
      int exp_d, got_d;
      {a_next, a_cur, a_prev, g_in} = 4'(i);
      #1;
      exp_g = !g_in && (a_cur != a_prev);
      exp_d = !exp_g ? 0 : (a_next ? -1 : 1);
      got_d = (c == 2'b00) ? 0 : (c == 2'b01) ? 1 : (c == 2'b11) ? -1 : 99;
      checks++;
      if (g_out !== exp_g || got_d != exp_d) begin
        failures++;
        $display("FAIL in=%b g_out=%b c=%b expected g=%b d=%0d", 4'(i), g_out, c, exp_g, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
