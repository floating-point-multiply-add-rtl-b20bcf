// Test of the alignment shifter.  Random operand pairs with exponent
// differences from 0 to beyond the mantissa width; the reference shifts the
// smaller operand in a 192-bit field (no clamp, no mask generator) and takes
// the integer part, R, G and the OR of everything below as S.
module tb_align_shifter;
  import mula_pkg::*;
  xfp_t p, c;
  logic signed [XEXP_W-1:0] e_more;
  logic swap, eff_sub, sign_more;
  logic [53:0] big, shifted;
  logic [2:0]  rgs;
  int checks = 0, failures = 0;

  align_shifter dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [191:0] wide;
      logic [63:0]  less;
      logic [52:0]  xi;
      logic [2:0]   xr;
      logic         xs;
      int           d;
      p.sign = 1'($urandom); c.sign = 1'($urandom);
      p.exp  = 13'($urandom_range(1, 2046));
      c.exp  = p.exp + 13'(signed'($urandom_range(0, 160)) - 80);
      if (n % 10 == 0) c.exp = p.exp;
      if (c.exp < 1) c.exp = 1;
      p.mant = {1'b1, 20'($urandom), $urandom, 11'b0};
      c.mant = {1'b1, 20'($urandom), $urandom, 11'b0};
      if (n % 3 == 0) p.mant[40:11] = '0;
      if (n % 5 == 2) begin
        // only a single low bit is shifted off: the sticky bit must come
        // from the bits pushed beyond the shifter
        int k;
        k = $urandom_range(11, 40);
        p.mant = (64'd1 << 63) | (64'd1 << k);
        c.exp  = p.exp + 13'(k + 1 + $urandom_range(0, 8));
      end
      #1;
      xs = c.exp >= p.exp;
      less = xs ? p.mant : c.mant;
      d = xs ? int'(c.exp - p.exp) : int'(p.exp - c.exp);
      wide = {less, 128'b0} >> ((d > 191) ? 191 : d);
      xi = wide[191:139];
      xr = {wide[138], wide[137], |wide[136:0]};
      checks++;
      if (swap !== xs || e_more !== (xs ? c.exp : p.exp) || eff_sub !== (p.sign ^ c.sign) ||
          sign_more !== (xs ? c.sign : p.sign) ||
          big !== (eff_sub ? ~{1'b0, (xs ? c.mant[63:11] : p.mant[63:11])}
                           :  {1'b0, (xs ? c.mant[63:11] : p.mant[63:11])}) ||
          shifted !== {1'b0, xi} || rgs !== xr) begin
        failures++;
        if (failures < 10) $display("d=%0d: %h %b vs %h %b", d, shifted, rgs, xi, xr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
