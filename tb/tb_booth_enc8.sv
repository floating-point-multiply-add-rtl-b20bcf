// Exhaustive test of the radix-8 Booth encoder cell: for all 16 input
// patterns the one-hot select must name |v| and the invert select the sign,
// where v = -4*b[3k+2] + 2*b[3k+1] + b[3k] + b[3k-1] is the group's digit.
module tb_booth_enc8;
  logic [3:0] bits;
  logic       sel_inv;
  logic [4:0] sel;
  int checks = 0, failures = 0;

  booth_enc8 dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int v, mag;
      bits = 4'(i);
      #1;
      v   = -4 * i[3] + 2 * i[2] + i[1] + i[0];
      mag = (v < 0) ? -v : v;
      checks++;
      if (sel !== 5'(1 << mag) || (v != 0 && sel_inv !== (v < 0))) begin
        failures++;
        $display("bits=%b: sel=%b inv=%b, digit %0d", bits, sel, sel_inv, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
