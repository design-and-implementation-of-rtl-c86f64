// tb_sign_unit: exhaustive check of the product sign (all four sign pairs).
// Expected value: negative exactly when the signs differ.
module tb_sign_unit;
  logic sa, sb, s;
  int checks = 0, failures = 0;

  sign_unit dut (.sa, .sb, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {sa, sb} = 2'(i);
      #1;
      checks++;
      if (s !== (sa != sb)) begin
        failures++;
        $display("FAIL sa=%b sb=%b s=%b", sa, sb, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
