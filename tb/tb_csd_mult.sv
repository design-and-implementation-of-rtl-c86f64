// tb_csd_mult: checks the CSD significand multiplier against the '*'
// operator. Multipliers are given three ways: canonic words built from the
// non-adjacent form of a random significand (as the converter produces
// them), arbitrary digit strings (any mix of 0/+1/-1, to exercise every
// term of the adder tree with either sign; products then compared modulo
// 2^48), and edge cases (all +1, all -1, single digits, largest operands).
module tb_csd_mult;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  logic [23:0] x;
  logic [49:0] csd;
  logic [47:0] prod;
  int checks = 0, failures = 0;

  csd_mult dut (.x, .csd, .prod);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of a digit word: 24 digits at weights 2^0..2^23 plus the top
  // digit at weight 2^23
  function automatic longint csd_value(input logic [49:0] w);
    longint v = 0;
    for (int k = 0; k < 25; k++) begin
      longint wt;
      wt = (k == 24) ? (64'sd1 <<< 23) : (64'sd1 <<< k);
      if (w[2*k +: 2] == 2'b01) v += wt;
      else if (w[2*k +: 2] == 2'b11) v -= wt;
    end
    return v;
  endfunction

  task automatic check_one(input logic [23:0] xv, input logic [49:0] w);
    logic [47:0] expect_p;
    x = xv; csd = w;
    #1;
    expect_p = 48'(longint'(xv) * csd_value(w));
    checks++;
    if (prod !== expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h csd=%b prod=%h expected %h", xv, w, prod, expect_p);
    end
  endtask

  function automatic logic [49:0] canon(input logic [22:0] m, input bit h);
    longint unsigned pos, neg;
    logic [49:0] w;
    naf(longint'(m), pos, neg);
    w = '0;
    for (int k = 0; k < 24; k++) w[2*k +: 2] = pos[k] ? 2'b01 : neg[k] ? 2'b11 : 2'b00;
    w[49:48] = h ? 2'b01 : 2'b00;
    return w;
  endfunction

  function automatic logic [49:0] any_digits();
    logic [49:0] w;
    for (int k = 0; k < 25; k++) begin
      int r;
      r = $urandom_range(2);
      w[2*k +: 2] = (r == 0) ? 2'b00 : (r == 1) ? 2'b01 : 2'b11;
    end
    return w;
  endfunction

  initial begin
    logic [49:0] all_pos, all_neg;
    for (int k = 0; k < 25; k++) begin
      all_pos[2*k +: 2] = 2'b01;
      all_neg[2*k +: 2] = 2'b11;
    end
    check_one(24'hFFFFFF, canon(23'h7FFFFF, 1));
    check_one(24'h800000, canon(23'h0, 1));
    check_one(24'hFFFFFF, all_pos);
    check_one(24'hFFFFFF, all_neg);
    check_one(24'h000001, all_neg);
    check_one(24'h0, any_digits());
    for (int k = 0; k < 25; k++) begin
      logic [49:0] w;
      w = '0;
      w[2*k +: 2] = 2'b11;
      check_one(24'hABCDEF, w);
      w[2*k +: 2] = 2'b01;
      check_one(24'hABCDEF, w);
    end
    for (int i = 0; i < 20000; i++)
      check_one({1'b1, 23'($urandom)}, canon(23'($urandom), 1));
    for (int i = 0; i < 20000; i++)
      check_one(24'($urandom), any_digits());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
