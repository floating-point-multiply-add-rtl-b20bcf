// Random test of the array combination: the two output vectors must add up,
// modulo 2^128, to the sign-extended outputs of the first array, plus those
// of the second array weighted by 2^33, plus the correction vector.
module tb_array_combine;
  logic [96:0]  s0, c0, s1, c1;
  logic [127:0] corr, sum, carry;
  int checks = 0, failures = 0;

  array_combine dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [127:0] want;
      s0 = {1'($urandom), $urandom, $urandom, $urandom};
      c0 = {1'($urandom), $urandom, $urandom, $urandom};
      s1 = {1'($urandom), $urandom, $urandom, $urandom};
      c1 = {1'($urandom), $urandom, $urandom, $urandom};
      corr = {$urandom, $urandom, $urandom, $urandom};
      if (n % 4 == 0) begin s0 = '1; c1 = '1; end
      #1;
      want = 128'(signed'(s0)) + 128'(signed'(c0)) + (128'(signed'(s1)) << 33) +
             (128'(signed'(c1)) << 33) + corr;
      checks++;
      if (sum + carry !== want) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
