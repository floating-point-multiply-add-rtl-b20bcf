// Test of the immediate/move path.  Random MOV, FIMM and FSHORU operations
// are issued with random stalls and a random "arithmetic pipeline empty"
// input; each value must come out in issue order, with the value formed
// independently here, after 1 advancing cycle when it could feed through
// (pipeline empty and nothing older in this chain) and after 4 otherwise.
module tb_imm_path;
  import mula_pkg::*;
  logic clk = 0, rst_n = 0, adv = 1, issue = 0, a_err = 0, feed = 0;
  op_e  op = OP_MOV;
  logic [63:0] a = '0;
  logic [15:0] imm = '0;
  logic out_valid, out_err;
  logic [63:0] out_data;
  int checks = 0, failures = 0, nfeed = 0, nslow = 0;
  longint unsigned advc = 0;

  imm_path dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (adv) advc <= advc + 1;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] d; logic e; int lat; longint unsigned at; } ex_t;
  ex_t q[$];
  longint unsigned last_slow = 0;
  logic any_slow = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000 || q.size() != 0; n++) begin
      @(negedge clk);
      adv  = ($urandom_range(0, 7) != 0);
      feed = ($urandom_range(0, 2) != 0);
      if (out_valid && adv) begin
        ex_t ex;
        ex = q.pop_front();
        checks++;
        if (out_data !== ex.d || out_err !== ex.e || int'(advc - ex.at) != ex.lat) begin
          failures++;
          if (failures < 10) $display("got %h/%b lat %0d, expected %h/%b lat %0d",
                                      out_data, out_err, advc - ex.at, ex.d, ex.e, ex.lat);
        end
      end
      issue = adv && n < 4000 && ($urandom_range(0, 2) == 0);
      if (issue) begin
        ex_t ex;
        op  = op_e'($urandom_range(0, 2) == 0 ? OP_MOV : ($urandom_range(0, 1) ? OP_FIMM : OP_FSHORU));
        a   = {$urandom, $urandom};
        imm = 16'($urandom);
        a_err = ($urandom_range(0, 9) == 0);
        case (op)
          OP_MOV:  begin ex.d = a; ex.e = a_err; end
          OP_FIMM: begin ex.d = 64'(signed'(imm)); ex.e = 0; end
          default: begin ex.d = (a << 16) | 64'(imm); ex.e = 0; end
        endcase
        ex.at = advc;
        if (feed && (!any_slow || advc - last_slow > 3)) begin
          ex.lat = 1; nfeed++;
        end else begin
          ex.lat = 4; nslow++; any_slow = 1; last_slow = advc;
        end
        q.push_back(ex);
      end
    end
    if (nfeed == 0 || nslow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
