// Test of the err-val path.  Operations with random err-val operands,
// random operand use and a random fault raised in the last cycle pass
// through with random stalls.  The output must carry the first err-val
// operand among those used, else (on a fault) a fresh word holding the cause
// code, the operation code and the instruction pointer, and no err-val flag
// when neither happened.
module tb_errval_path;
  import mula_pkg::*;
  logic clk = 0, rst_n = 0, adv = 1, issue = 0;
  op_e  op = OP_FADD;
  logic [63:0] ip = '0, a = '0, b = '0, c = '0;
  logic use_b = 0, use_c = 0, a_err = 0, b_err = 0, c_err = 0, gen = 0;
  err_code_e gen_code = ERR_NONE;
  logic out_err;
  logic [63:0] out_word;
  int checks = 0, failures = 0;

  errval_path dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic err; logic [63:0] w; logic g; err_code_e code; } ex_t;
  ex_t pipe [$];   // entries in flight, oldest first
  ex_t outq [$];

  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // one operation per four advancing cycles keeps the bookkeeping simple
    while (n < 3000) begin
      ex_t ex;
      int k;
      @(negedge clk);
      issue = 1; adv = 1;
      op = op_e'($urandom_range(0, 9));
      ip = {$urandom, $urandom};
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      use_b = 1'($urandom); use_c = 1'($urandom);
      a_err = ($urandom_range(0, 3) == 0); b_err = 1'($urandom); c_err = 1'($urandom);
      if (a_err)               begin ex.err = 1; ex.w = a; end
      else if (use_b && b_err) begin ex.err = 1; ex.w = b; end
      else if (use_c && c_err) begin ex.err = 1; ex.w = c; end
      else                     begin ex.err = 0; ex.w = {4'b0, op, ip[55:0]}; end
      ex.g = ($urandom_range(0, 2) == 0);
      ex.code = ex.g ? ERR_INVALID : ERR_NONE;
      if (!ex.err && ex.g) ex.w[63:60] = ERR_INVALID;
      @(negedge clk);
      issue = 0;
      k = 1;
      // three more advancing cycles with random stalls; the fault is
      // reported in the cycle the operation sits in the last register
      while (k < 4) begin
        adv = ($urandom_range(0, 3) != 0);
        gen = (k == 3) ? ex.g : 1'($urandom);
        gen_code = (k == 3) ? ex.code : ERR_CONVERT;
        if (adv) k++;
        @(negedge clk);
      end
      adv = 1; gen = 0;
      checks++;
      if (out_err !== (ex.err | ex.g) || ((ex.err | ex.g) && out_word !== ex.w)) begin
        failures++;
        if (failures < 10) $display("got %b %h expected %b %h", out_err, out_word, ex.err | ex.g, ex.w);
      end
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
