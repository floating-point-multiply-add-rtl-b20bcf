// Test of the multiplier rounding stage.  Floating-point mode: a product of
// two random 53-bit mantissas (normalized, or with leading zeros as from a
// denormal operand) is placed with its binary point between bits 116 and
// 115, split into a random sum/carry pair, and the rounded mantissa and
// exponent adjustment are compared with a round-to-nearest-even computed
// from the exact product by division and remainder.  Products built to hit
// exact ties and the all-ones carry-out case are included.  Integer mode:
// the two 64-bit halves must equal sum + carry.
module tb_mult_round;
  logic [127:0] sum, carry;
  logic         is_int;
  logic [63:0]  prod_lo, prod_hi;
  logic [52:0]  mant;
  logic [1:0]   exp_adj;
  int checks = 0, failures = 0, ties = 0;

  mult_round dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [52:0]  ma, mb;
      logic [127:0] q, pw, half, rem, qq;
      int           lsb, adj;
      ma = {1'b1, 20'($urandom), $urandom};
      mb = {1'b1, 20'($urandom), $urandom};
      if (n % 4 == 1) begin ma[25:0] = '0; mb[26:0] = '0; end   // short: ties
      if (n % 4 == 2) begin ma = '1; mb = '1; end
      if (n % 16 == 3) ma = ma >> $urandom_range(1, 40);        // denormal-like
      if (n % 4 == 2 && n % 8 == 6) mb = 53'h10000000000000 | 53'($urandom_range(0, 3));
      if (n % 8 == 5) begin        // odd * 1.5: the rounding bit is the last 1
        mb = 53'h18000000000000;
        ma[51:50] = 2'b00;
        ma[0] = 1'b1;
        ma[1] = 1'($urandom);             // either parity of the tie
        if (n % 16 == 13) ma[51] = 1'b1;   // product >= 2: tie one place up
      end
      q   = (128'(ma) * 128'(mb)) << 12;
      lsb = q[117] ? 65 : 64;
      pw  = 128'd1 << lsb;
      half = pw >> 1;
      rem = q % pw;
      qq  = q / pw;
      if (rem > half || (rem == half && qq[0])) qq++;
      if (rem == half) ties++;
      adj = lsb - 64;
      if (qq[53]) begin qq = qq >> 1; adj++; end
      sum    = {$urandom, $urandom, $urandom, $urandom};
      carry  = q - sum;
      is_int = 1'b0;
      #1;
      checks++;
      if (mant !== qq[52:0] || int'(exp_adj) != adj) begin
        failures++;
        if (failures < 10) $display("ma=%h mb=%h: %h/%0d vs %h/%0d", ma, mb, mant, exp_adj, qq[52:0], adj);
      end
      // integer mode
      sum    = {$urandom, $urandom, $urandom, $urandom};
      carry  = {$urandom, $urandom, $urandom, $urandom};
      if (n % 5 == 0) carry = ~sum + 128'd1 + 128'($urandom_range(0, 1) << 63);
      is_int = 1'b1;
      #1;
      checks++;
      if ({prod_hi, prod_lo} !== sum + carry) failures++;
    end
    if (ties == 0) begin
      failures++;
      $display("no tie case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
