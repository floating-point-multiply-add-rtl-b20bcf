// Random test of one 11-input multiplication array.  Inputs are random
// 66-bit two's-complement partial products (with runs of all-ones and
// most-negative values to stress the sign extension).  The two outputs,
// sign-extended to 128 bits, must add up to the sum of the inputs, each
// sign-extended and weighted by 2^(3k), modulo 2^128.
module tb_mult_array;
  logic [65:0] pp [11];
  logic [96:0] sum, carry;
  int checks = 0, failures = 0;

  mult_array dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] r, got;
      r = '0;
      for (int k = 0; k < 11; k++) begin
        pp[k] = {2'($urandom), $urandom, $urandom};
        if (n % 5 == 0) pp[k] = '1;
        if (n % 7 == 0) pp[k] = {1'b1, 65'b0};
        if (n % 9 == 0 && k % 2 == 0) pp[k] = {1'b0, {65{1'b1}}};
        r += 128'(signed'(pp[k])) << (3*k);
      end
      #1;
      got = 128'(signed'(sum)) + 128'(signed'(carry));
      checks++;
      if (got !== r) begin
        failures++;
        if (failures < 10) $display("mismatch %h vs %h", got, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
