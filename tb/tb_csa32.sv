// Test of the 3-2 adder row: exhaustive truth table of one bit position
// (the full-adder table), then random 64-bit vectors whose sum and carry
// outputs must add up to the sum of the three inputs.
module tb_csa32;
  logic [63:0] in0, in1, in2, sum, carry;
  int checks = 0, failures = 0;

  csa32 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      in0 = 64'(i[0]); in1 = 64'(i[1]); in2 = 64'(i[2]);
      #1;
      checks++;
      if (sum[0] !== ^i[2:0] || carry[1] !== (i[2:0] inside {3, 5, 6, 7})) failures++;
    end
    for (int n = 0; n < 1000; n++) begin
      in0 = {$urandom, $urandom}; in1 = {$urandom, $urandom}; in2 = {$urandom, $urandom};
      #1;
      checks++;
      if (sum + carry !== in0 + in1 + in2 || sum !== (in0 ^ in1 ^ in2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
