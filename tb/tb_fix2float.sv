// tb_fix2float: checks the Q10.9 to single-precision converter on every one
// of the 2^20 input codes. The float must be zero for code 0 and otherwise a
// normal number whose exact value (decoded with real arithmetic) equals
// code / 2^9.
module tb_fix2float;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  logic [19:0] fx;
  float32_t    f;
  int checks = 0, failures = 0;

  fix2float dut (.fx, .f);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 20); i++) begin
      real want;
      bit  bad;
      fx = 20'(i);
      #1;
      want = real'(int'(signed'(fx))) / 512.0;
      bad  = (f2real(f) != want);
      if (fx == 0 && f != 32'h0) bad = 1;
      if (fx != 0 && (f.exp == 8'h00 || f.exp == 8'hFF)) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL fx=%h f=%h want %f", fx, f, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
