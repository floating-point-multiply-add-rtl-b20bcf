// Test of the combined add-and-round.  The reference works on exact integers
// in units of 1/8 of the integer LSB: it forms big +/- (shifted.RGS) (for a
// subtraction the unshifted operand is given inverted), takes
// the magnitude, finds where the LSB will lie after normalization (capped by
// pos_max, or fixed at R), and rounds to nearest even there by division and
// remainder.  Operands range over equal and different sizes, subtraction
// with either sign of result, exact ties and long carry chains.
module tb_add_round;
  logic [53:0] big, shifted;
  logic [2:0]  rgs;
  logic        eff_sub, fixed_r, neg;
  logic [1:0]  pos_max;
  logic [55:0] v;
  int checks = 0, failures = 0, nneg = 0, nties = 0;

  add_round dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic [52:0]  bi, si;
      logic [2:0]   r0;
      logic signed [63:0] z;
      logic [63:0]  mag, unit, q, rem;
      int           pos;
      logic         sub, fx;
      logic [1:0]   pm;
      bi = {1'b1, 20'($urandom), $urandom};
      si = {20'($urandom), $urandom} >> $urandom_range(0, 20);
      r0 = 3'($urandom);
      if (n % 5 == 0) si = bi ^ 53'($urandom_range(0, 7));     // near cancellation
      if (n % 7 == 0) begin si = bi; r0 = 3'($urandom_range(0, 7)); end
      if (n % 11 == 0) bi = '1;
      if (n % 13 == 0) bi = 53'($urandom_range(0, 1000));      // denormal-sized
      if (n % 17 == 0) begin bi[0] = 1'b1; r0 = 3'b100; end       // tie
      sub = 1'($urandom);
      fx  = (n % 19 == 0);
      pm  = (n % 6 == 0) ? 2'($urandom_range(1, 3)) : 2'd3;   // e_more >= 1
      if (!sub) pm = 2'd3;
      big = sub ? ~{1'b0, bi} : {1'b0, bi};
      shifted = {1'b0, si};
      rgs = r0;
      eff_sub = sub; fixed_r = fx; pos_max = pm;
      #1;
      z   = sub ? 64'(bi) * 8 - (64'(si) * 8 + 64'(r0)) : 64'(bi) * 8 + 64'(si) * 8 + 64'(r0);
      mag = (z < 0) ? 64'(-z) : 64'(z);
      if (fx) pos = 1;
      else if (mag[56]) pos = 0;
      else if (mag[55]) pos = 1;
      else if (mag[54]) pos = 2;
      else pos = 3;
      if (!fx && pos > int'(pm)) pos = int'(pm);
      unit = 64'd16 >> pos;
      q   = mag / unit;
      rem = mag % unit;
      if (rem * 2 > unit || (rem * 2 == unit && q[0])) q++;
      if (rem * 2 == unit) nties++;
      q = q * unit;
      if (z < 0) nneg++;
      checks++;
      // the sign of an exact zero is decided elsewhere
      if ((mag != 0 && neg !== (z < 0)) || v !== q[56:1]) begin
        failures++;
        if (failures < 10)
          $display("bi=%h si=%h r=%b sub=%b pm=%0d: v=%h neg=%b, expected %h %b",
                   bi, si, r0, sub, pm, v, neg, q[56:1], z < 0);
      end
    end
    if (nneg == 0 || nties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
