// Test of the sticky mask generator: for random words and every shift
// amount, exactly the bits below the shift amount must pass.
module tb_mask_gen;
  logic [63:0] x, masked;
  logic [5:0]  shamt;
  int checks = 0, failures = 0;

  mask_gen dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      x = {$urandom, $urandom};
      if (n == 0) x = '1;
      for (int s = 0; s < 64; s++) begin
        logic [63:0] m;
        shamt = 6'(s);
        #1;
        m = '0;
        for (int j = 0; j < s; j++) m[j] = 1'b1;
        checks++;
        if (masked !== (x & m)) begin
          failures++;
          if (failures < 10) $display("x=%h sh=%0d: %h", x, s, masked);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
