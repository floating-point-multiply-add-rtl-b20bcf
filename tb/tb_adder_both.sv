// Test of the dual-result adder: random and carry-chain-stressing operands;
// sum0/cout0 must equal a+b and sum1/cout1 a+b+1.
module tb_adder_both;
  logic [63:0] a, b, sum0, sum1;
  logic        cout0, cout1;
  int checks = 0, failures = 0;

  adder_both dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n % 3 == 0) b = ~a;                              // all propagate
      if (n % 9 == 0) b = ~a ^ (64'd1 << $urandom_range(0, 63));
      #1;
      checks++;
      if ({cout0, sum0} !== {1'b0, a} + {1'b0, b} ||
          {cout1, sum1} !== {1'b0, a} + {1'b0, b} + 65'd1) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h: %h %h", a, b, sum0, sum1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
