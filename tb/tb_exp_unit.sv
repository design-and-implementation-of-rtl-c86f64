// tb_exp_unit: exhaustive check of the exponent sum ea + eb - 127 over all
// 65536 pairs of 8-bit biased exponents, against integer arithmetic.
module tb_exp_unit;
  logic [7:0]        ea, eb;
  logic signed [9:0] e;
  int checks = 0, failures = 0;

  exp_unit dut (.ea, .eb, .e);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        ea = 8'(i);
        eb = 8'(j);
        #1;
        checks++;
        if (int'(e) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL ea=%0d eb=%0d e=%0d", i, j, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
