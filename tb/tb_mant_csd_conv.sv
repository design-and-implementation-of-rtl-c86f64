// tb_mant_csd_conv: checks the mantissa-to-CSD converter on edge mantissas
// and 20000 random ones, with the hidden digit on and off. The 24 low digits
// must equal, digit for digit, the non-adjacent form of the mantissa computed
// with the identity NAF(n) = ((n + n/2) ^ n/2) split into +1/-1 masks; the
// whole 50-bit word must have the value hidden*2^23 + mantissa; no two
// adjacent low digits may be nonzero; the code 10 must never appear.
module tb_mant_csd_conv;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  logic [22:0] man;
  logic        hidden;
  logic [49:0] csd;
  int checks = 0, failures = 0;
  int nonzero_total = 0, samples = 0;

  mant_csd_conv dut (.man, .hidden, .csd);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [22:0] m, input logic h);
    longint unsigned pos, neg;
    longint value;
    logic [1:0] d, e;
    bit bad;
    man = m; hidden = h;
    #1;
    naf(longint'(m), pos, neg);
    bad = 0; value = 0;
    for (int k = 0; k < 24; k++) begin
      d = csd[2*k +: 2];
      e = pos[k] ? 2'b01 : neg[k] ? 2'b11 : 2'b00;
      if (d != e) bad = 1;
      if (d == 2'b10) bad = 1;
      if (k > 0 && d != 2'b00 && csd[2*k-2 +: 2] != 2'b00) bad = 1;
      if (d == 2'b01) value += (64'sd1 <<< k);
      if (d == 2'b11) value -= (64'sd1 <<< k);
      if (d != 2'b00) nonzero_total++;
    end
    samples++;
    if (csd[49:48] != (h ? 2'b01 : 2'b00)) bad = 1;
    if (h) value += (64'sd1 <<< 23);
    if (value != longint'(m) + (h ? (64'sd1 <<< 23) : 0)) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("FAIL man=%h hidden=%b csd=%b", m, h, csd);
    end
  endtask

  initial begin
    logic [22:0] edges [8] = '{23'h0, 23'h1, 23'h7FFFFF, 23'h555555, 23'h2AAAAA,
                                23'h400000, 23'h600000, 23'h3FFFFF};
    foreach (edges[i]) begin
      check_one(edges[i], 1'b1);
      check_one(edges[i], 1'b0);
    end
    for (int i = 0; i < 20000; i++) check_one(23'($urandom), 1'($urandom));
    $display("average nonzero digits per 24-digit word: %0d/100",
             (nonzero_total * 100) / samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
