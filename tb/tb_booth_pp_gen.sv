// Random test of the Booth partial-product stage.  Each partial product,
// plus its correction bit, must equal the radix-8 digit of its multiplier
// group (worked out here from the digit formula -4*b2 + 2*b1 + b0 + b-1)
// times the multiplicand; and all 22, sign-extended and weighted by 2^(3k),
// plus the correction vector must add up to the signed product of the
// 64-bit multiplicand and the 66-bit multiplier, modulo 2^128.
module tb_booth_pp_gen;
  logic [63:0]  a;
  logic [65:0]  b;
  logic [65:0]  pp [22];
  logic [127:0] corr;
  int checks = 0, failures = 0;

  booth_pp_gen dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] acc, ref_p;
      a = {$urandom, $urandom};
      b = {2'($urandom), $urandom, $urandom};
      if (n % 7 == 0) a = 64'h8000000000000000;
      if (n % 11 == 0) b = {2'b11, 64'h0};
      if (n % 13 == 0) b = {1'b0, 1'b1, 64'hFFFF_FFFF_FFFF_F000};
      #1;
      acc = corr;
      for (int k = 0; k < 22; k++) acc += 128'(signed'(pp[k])) << (3*k);
      for (int k = 0; k < 22; k++) begin
        logic [66:0]  bx;
        longint       d;
        logic [127:0] want, got;
        bx   = {b, 1'b0};
        d    = (3*k + 3 <= 66) ? -4*longint'(bx[3*k+3]) : -4*longint'(b[65]);
        d   += 2*longint'(bx[3*k+2]) + longint'(bx[3*k+1]) + longint'(bx[3*k]);
        want = 128'($signed(a) * d);
        got  = 128'(signed'(pp[k])) + 128'(corr[3*k]);
        checks++;
        if (got !== want || corr[3*k+1] || corr[3*k+2]) begin
          failures++;
          if (failures < 10) $display("product %0d of a=%h b=%h: %h vs %h", k, a, b, got, want);
        end
      end
      ref_p = 128'($signed(a) * $signed({{62{b[65]}}, b}));
      checks++;
      if (acc !== ref_p) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h: %h vs %h", a, b, acc, ref_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
