// Test of the 64-bit leading-zero detector on random words with every
// possible position of the first 1, and on zero.
module tb_lzd64;
  logic [63:0] x;
  logic [6:0]  count;
  logic        zero;
  int checks = 0, failures = 0;

  lzd64 dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      for (int p = 0; p <= 64; p++) begin
        int r;
        x = (p == 64) ? 64'd0 : (({$urandom, $urandom} | 64'd1) & ((64'd1 << (63 - p)) - 1))
                                | (64'd1 << (63 - p));
        if (p == 0) x = {1'b1, 31'($urandom), $urandom};
        #1;
        r = 64;
        for (int i = 0; i < 64; i++) if (x[i]) r = 63 - i;
        checks++;
        if (int'(count) != r || zero !== (x == 0)) begin
          failures++;
          if (failures < 10) $display("x=%h: %0d vs %0d", x, count, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
