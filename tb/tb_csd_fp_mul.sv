// tb_csd_fp_mul: checks the pipelined CSD floating-point multiplier.
// Operands are issued on most cycles (random idle cycles in between) and
// drawn from a mix of random normals over the whole exponent range, values
// whose product lands near overflow or underflow, significands that force a
// rounding carry, and the specials (zero, denormal, infinity, NaN). Denormal
// operands and denormal results follow IEEE-754 gradual underflow. Each
// result must equal fp_ref_pkg::ref_fmul and must appear with out_valid
// exactly 3 cycles after its operands, one result per issued operation; a
// gap in the input must give a gap in the output. out_valid must be low
// after reset. Every mechanism must be seen at least once.
module tb_csd_fp_mul;
  import fp_csd_pkg::*;
  import fp_ref_pkg::*;
  localparam int LATENCY = 3;
  localparam int NOPS = 40000;

  logic      clk = 0, rst_n = 0, in_valid = 0;
  float32_t  a, b, y;
  logic      out_valid;
  fp_flags_t flags;
  int checks = 0, failures = 0, cycle = 0, issued = 0, received = 0;
  int n_rup = 0, n_carry = 0, n_ovf = 0, n_unf = 0, n_nan = 0, n_inf = 0, n_zero = 0, n_den = 0;
  int n_gap = 0, n_b2b = 0, n_sub = 0;

  typedef struct { ref_res_t r; int due; logic [31:0] a, b; } pend_t;
  pend_t q[$];

  csd_fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y, .flags);

  always #5 clk = ~clk;

  initial begin
    #(10 * (NOPS * 2 + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_op(input int kind, input int elo, input int ehi);
    logic [31:0] v;
    v = $urandom;
    case (kind)
      0: v[30:23] = 8'h00;                               // zero or denormal
      1: begin v[30:23] = 8'hFF; v[22:0] = ($urandom_range(1) == 0) ? 23'h0 : 23'($urandom); end
      default: v[30:23] = 8'($urandom_range(ehi, elo));
    endcase
    if (kind == 0 && $urandom_range(1) == 0) v[22:0] = 0;
    return v;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // checker
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
          if (p.due != cycle || y !== p.r.y || flags !== p.r.flags) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h y=%h flags=%b cycle %0d expected %h %b cycle %0d",
                       p.a, p.b, y, flags, cycle, p.r.y, p.r.flags, p.due);
          end else begin
            if (p.r.flags == 0 && p.r.rnd_up) n_rup++;
            if (p.r.flags == 0 && p.r.rnd_carry) n_carry++;
            n_ovf  += int'(flags.ovf);
            n_unf  += int'(flags.unf);
            n_nan  += int'(flags.nan);
            n_inf  += int'(flags.inf);
            n_zero += int'(flags.zero);
            if (p.a[30:23] == 0 && p.a[22:0] != 0 || p.b[30:23] == 0 && p.b[22:0] != 0) n_den++;
            if (flags == 5'b00001) n_sub++;
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
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid high in reset"); end
    rst_n = 1;
    while (issued < NOPS) begin
      int mode;
      logic [31:0] av, bv;
      mode = $urandom_range(99);
      if (mode < 10) begin
        in_valid = 0;
        n_gap++;
      end else begin
        if (mode < 60) begin
          av = rand_op(2, 1, 254); bv = rand_op(2, 1, 254);
        end else if (mode < 75) begin
          av = rand_op(2, 100, 160); bv = rand_op(2, 100, 160);
        end else if (mode < 80) begin
          av = rand_op(2, 180, 254); bv = rand_op(2, 180, 254);        // near overflow
        end else if (mode < 85) begin
          av = rand_op(2, 1, 70); bv = rand_op(2, 1, 70);              // near underflow
        end else if (mode < 88) begin
          av = {1'($urandom), 8'd127, 23'h000001};                      // rounding carry
          bv = {1'($urandom), 8'($urandom_range(200, 60)), 23'h7FFFFE};
        end else begin
          av = rand_op($urandom_range(2), 1, 254); bv = rand_op($urandom_range(2), 1, 254);
        end
        if ($urandom_range(1) == 1) begin logic [31:0] t; t = av; av = bv; bv = t; end
        in_valid = 1;
        a = av; b = bv;
        q.push_back('{r: ref_fmul(av, bv), due: cycle + LATENCY, a: av, b: bv});
        issued++;
        if (mode >= 10) n_b2b++;
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
    $display("mechanisms: round_up=%0d carry=%0d ovf=%0d unf=%0d nan=%0d inf=%0d zero=%0d denorm=%0d denorm_result=%0d idle=%0d",
             n_rup, n_carry, n_ovf, n_unf, n_nan, n_inf, n_zero, n_den, n_sub, n_gap);
    if (n_sub == 0 || n_rup == 0 || n_carry == 0 || n_ovf == 0 || n_unf == 0 || n_nan == 0 || n_inf == 0 ||
        n_zero == 0 || n_den == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
