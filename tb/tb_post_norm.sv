// Test of post-normalization: random rounded values with any number of
// leading zeros and exponents from 1 up, plus the fixed (float-to-integer)
// mode.  The reference shifts one place at a time while the top bit is 0 and
// the exponent stays above 1.
module tb_post_norm;
  import mula_pkg::*;
  logic [55:0] v;
  logic signed [XEXP_W-1:0] e_more, exp;
  logic        fixed_mode;
  logic [3:0]  fix_lsh;
  logic [52:0] mant;
  logic [64:0] int_out;
  int checks = 0, failures = 0;

  post_norm dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      logic [55:0] w;
      int e, r_exp;
      v = {24'($urandom), $urandom} >> $urandom_range(0, 56);
      e_more = 13'($urandom_range(1, 80));
      if (n % 2 == 0) e_more = 13'($urandom_range(1, 2100));
      fixed_mode = (n % 5 == 0);
      fix_lsh = 4'($urandom_range(0, 11));
      #1;
      checks++;
      if (fixed_mode) begin
        if (int_out !== (65'(v[55:2]) << fix_lsh)) failures++;
      end else begin
        w = v;
        e = int'(e_more) + 1;
        while (!w[55] && e > 1 && w != 0) begin w = w << 1; e--; end
        r_exp = w[55] ? e : 0;
        if (mant !== w[55:3] || int'(exp) != r_exp) begin
          failures++;
          if (failures < 10) $display("v=%h e=%0d: %h %0d vs %h %0d", v, e_more, mant, exp, w[55:3], r_exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
