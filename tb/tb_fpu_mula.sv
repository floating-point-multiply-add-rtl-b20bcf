// End-to-end testbench of the multiply/add unit at its default configuration.
//
// Random operation streams (all sixteen operations, special values, ties,
// cancellations, near-overflow and near-underflow operands, err-val
// operands) are issued with random gaps and random stalls.  Every result is
// compared in issue order against a reference computed independently with
// the simulator's IEEE double arithmetic (real), 128-bit integer products and
// direct bit manipulation.  The latency of each result, counted in cycles the
// pipeline advanced, is checked: 4 for arithmetic, 1 for a move/immediate
// that found the pipeline empty, otherwise 4.  Each mechanism of the design
// is counted and a failure is recorded for any that never happened.
//
// Known deviation, counted but not failed: a multiply whose exact product is
// below the normal range is rounded twice (product, then denormal alignment)
// and may differ from IEEE by one unit in the last place, which is checked;
// a multiply with a denormal operand is rounded at a fixed position and
// keeps fewer significant bits, so its value is not compared.
module tb_fpu_mula;
  import mula_pkg::*;

  localparam int NOPS = 40000;

  logic clk = 1'b0, rst_n = 1'b0, stall = 1'b0, in_valid = 1'b0;
  op_e  in_op = OP_FADD;
  logic [63:0] in_a = '0, in_b = '0, in_c = '0, in_ip = '0;
  logic in_a_err = 1'b0, in_b_err = 1'b0, in_c_err = 1'b0;
  logic [15:0] in_imm = '0;
  logic out_valid, out_err;
  logic [63:0] out_data;

  fpu_mula dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, deviations = 0;
  longint unsigned cycles = 0, adv_count = 0;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (!stall) adv_count <= adv_count + 1;
  end

  initial begin : watchdog
    repeat (NOPS * 4 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] data;
    logic        err;
    logic [1:0]  loose;     // known deviation: 1 = within one ulp, 2 = any
    int          lat;
    longint unsigned adv_at_issue;
    op_e         op;
    logic [63:0] a, b, c;
  } exp_t;
  exp_t q[$];

  // distance of two doubles in units in the last place (finite values)
  function automatic longint ulp_dist(logic [63:0] x, logic [63:0] y);
    longint ox, oy;
    ox = x[63] ? -longint'({1'b0, x[62:0]}) : longint'({1'b0, x[62:0]});
    oy = y[63] ? -longint'({1'b0, y[62:0]}) : longint'({1'b0, y[62:0]});
    return (ox > oy) ? ox - oy : oy - ox;
  endfunction

  // ---------------------------------------------------------------------
  // reference model
  // ---------------------------------------------------------------------
  function automatic logic is_nan64(logic [63:0] x);
    return x[62:52] == 11'h7FF && x[51:0] != 0;
  endfunction
  function automatic logic [63:0] canon(real r);
    return $realtobits(r);
  endfunction

  // round-to-nearest-even of a real to an integer value (as real)
  function automatic real rne(real x);
    real t, f;
    t = (x >= 0.0) ? $floor(x) : -$floor(-x);
    f = x - t;
    if (f > 0.5 || (f == 0.5 && $floor(t / 2.0) * 2.0 != t)) t = t + 1.0;
    else if (f < -0.5 || (f == -0.5 && $floor(t / 2.0) * 2.0 != t)) t = t - 1.0;
    return t;
  endfunction

  localparam real TWO63 = 9223372036854775808.0;
  localparam real TWO64 = 18446744073709551616.0;

  function automatic void reference(op_e op, logic [63:0] a, logic [63:0] b, logic [63:0] c,
                                    logic [15:0] imm, logic ae, logic be, logic ce,
                                    output logic [63:0] d, output logic e, output logic [1:0] loose);
    real ra, rb, rc, rp, rr, t;
    logic signed [127:0] prod;
    logic uses_b, uses_c;
    ra = $bitstoreal(a); rb = $bitstoreal(b); rc = $bitstoreal(c);
    e = 1'b0; loose = 2'd0; d = '0;
    uses_b = !(op inside {OP_MOV, OP_ITOF, OP_FTOI, OP_FTOIU, OP_FIMM, OP_FSHORU});
    uses_c = op == OP_FMULA;
    case (op)
      OP_FADD:  rr = ra + rb;
      OP_FSUB:  rr = ra - rb;
      OP_FMUL:  rr = ra * rb;
      OP_FMULA: begin rp = ra * rb; rr = rp + rc; end
      default:  rr = 0.0;
    endcase
    case (op)
      OP_FADD, OP_FSUB, OP_FMUL, OP_FMULA: begin
        if (is_nan64($realtobits(rr))) e = 1'b1;
        else d = canon(rr);
        if (op inside {OP_FMUL, OP_FMULA}) begin
          // exact product below the normal range, or denormal operand
          if (int'(a[62:52]) + int'(b[62:52]) - 1023 < 2 && a[62:52] != 0 && b[62:52] != 0) loose = 2'd1;
          if ((a[62:52] == 0 && a[51:0] != 0) || (b[62:52] == 0 && b[51:0] != 0)) loose = 2'd2;
        end
      end
      OP_IMUL, OP_HMUL: begin
        prod = $signed({{64{a[63]}}, a}) * $signed({{64{b[63]}}, b});
        d = (op == OP_IMUL) ? prod[63:0] : prod[127:64];
      end
      OP_ITOF: d = canon(real'($signed(a)));
      OP_FTOI: begin
        if (is_nan64(a)) e = 1;
        else begin
          t = rne(ra);
          if (t >= TWO63 || t < -TWO63) e = 1;
          else d = 64'(longint'(t));
        end
      end
      OP_FTOIU: begin
        if (is_nan64(a)) e = 1;
        else begin
          t = rne(ra);
          if (t >= TWO64 || t < 0.0) e = 1;
          else if (t >= TWO63) d = 64'(longint'(t - TWO63)) + 64'h8000000000000000;
          else d = 64'(longint'(t));
        end
      end
      OP_FLT: d = {63'b0, ra <  rb};
      OP_FLE: d = {63'b0, ra <= rb};
      OP_FEQ: d = {63'b0, ra == rb};
      OP_FNE: d = {63'b0, ra != rb};
      OP_MOV:    begin d = a; e = ae; end
      OP_FIMM:   d = {{48{imm[15]}}, imm};
      OP_FSHORU: d = {a[47:0], imm};
      default: ;
    endcase
    // err-val operands dominate (not for the move/immediate path)
    if (!(op inside {OP_MOV, OP_FIMM, OP_FSHORU})) begin
      if (ae)                 begin e = 1; d = a; end
      else if (uses_b && be)  begin e = 1; d = b; end
      else if (uses_c && ce)  begin e = 1; d = c; end
    end
  endfunction

  // ---------------------------------------------------------------------
  // stimulus
  // ---------------------------------------------------------------------
  function automatic logic [63:0] rnd_double(int kind);
    logic [63:0] x;
    x = {$urandom, $urandom};
    case (kind)
      0: x[62:52] = 11'(1023 - 30 + $urandom_range(0, 60));
      1: ;
      2: case ($urandom_range(0, 6))
           0: x[62:0] = '0;
           1: x[62:0] = {11'h7FF, 52'b0};
           2: x[62:52] = 11'h7FF;                          // NaN (or inf)
           3: x[62:52] = '0;                               // denormal
           4: x[62:52] = 11'h7FE;
           5: x[62:52] = 11'(1 + $urandom_range(0, 3));
           default: x[62:0] = {11'h3FF, 52'b0};
         endcase
      3: x[62:52] = 11'($urandom_range(1, 560));            // small
      4: x[62:52] = 11'($urandom_range(1500, 2046));        // large
      default: begin                                        // few mantissa bits: ties
        x[62:52] = 11'(1023 - 4 + $urandom_range(0, 8));
        x[40:0]  = '0;
      end
    endcase
    return x;
  endfunction

  int cnt_stall = 0, cnt_feed = 0, cnt_mulov = 0, cnt_mround = 0, cnt_mtie = 0;
  int cnt_around = 0, cnt_atie = 0, cnt_cancel = 0, cnt_neg = 0, cnt_sticky = 0;
  int cnt_denorm = 0, cnt_ovf = 0, cnt_errgen = 0, cnt_errprop = 0, cnt_ftoi_big = 0;
  int cnt_int = 0;
  longint unsigned last_arith_adv = 0;
  logic any_arith = 1'b0;

  // mechanism monitors on the pipeline's internal decisions
  always @(posedge clk) if (rst_n && !stall) begin
    if (dut.r1.v && dut.r1.op inside {OP_FMUL, OP_FMULA} && dut.padj != 0) cnt_mulov++;
    if (dut.r1.v && dut.r1.op inside {OP_FMUL, OP_FMULA} && dut.u_mround.inc) cnt_mround++;
    if (dut.r1.v && dut.r1.op inside {OP_FMUL, OP_FMULA} && dut.u_mround.tie) cnt_mtie++;
    if (dut.r1.v && dut.r1.op inside {OP_IMUL, OP_HMUL}) cnt_int++;
    if (dut.r2.v && dut.u_align.masked != 0) cnt_sticky++;
    if (dut.r3.v && is_fp_arith(dut.r3.op)) begin
      if (dut.u_addr.bitvec[3] && !dut.u_addr.neg) cnt_around++;
      if (dut.u_addr.tie && dut.u_addr.lowr != 0) cnt_atie++;
      if (dut.u_norm.shift >= 2 && dut.u_norm.w[55]) cnt_cancel++;
      if (dut.u_addr.neg) cnt_neg++;
    end
    if (dut.r3.v && dut.r3.op == OP_FTOI && dut.r3.lsh != 0) cnt_ftoi_big++;
    if (dut.r3.v && dut.gen) cnt_errgen++;
  end

  task automatic consume();
    exp_t ex;
    int lat;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected output %h", out_data);
      return;
    end
    ex = q.pop_front();
    lat = int'(adv_count - ex.adv_at_issue);
    checks++;
    if (lat != ex.lat) begin
      failures++;
      if (failures < 20) $display("latency %0d, expected %0d, op %s", lat, ex.lat, ex.op.name());
    end
    if (lat == 1) cnt_feed++;
    checks++;
    if (out_err !== ex.err || (!ex.err && out_data !== ex.data) ||
        (ex.err && ex.data != 0 && out_data !== ex.data)) begin
      if (ex.loose == 2'd2 && !ex.err && !out_err) deviations++;
      else if (ex.loose == 2'd1 && !ex.err && !out_err && ulp_dist(out_data, ex.data) <= 1) deviations++;
      else begin
        failures++;
        if (failures < 20)
          $display("MISMATCH op %s a=%h b=%h c=%h: got %h err %b, expected %h err %b",
                   ex.op.name(), ex.a, ex.b, ex.c, out_data, out_err, ex.data, ex.err);
      end
    end
    if (out_err && ex.err) begin
      if (out_data[63:60] == ERR_NONE) cnt_errprop++;
    end
    if (!out_err && is_fp_arith(ex.op) && out_data[62:52] == 0 && out_data[51:0] != 0) cnt_denorm++;
    if (!out_err && is_fp_arith(ex.op) && out_data[62:0] == {11'h7FF, 52'b0} &&
        ex.a[62:52] != 11'h7FF && ex.b[62:52] != 11'h7FF && ex.c[62:52] != 11'h7FF) cnt_ovf++;
  endtask

  task automatic pick(output op_e op, output logic [63:0] a, output logic [63:0] b,
                      output logic [63:0] c, output logic [15:0] imm,
                      output logic ae, output logic be, output logic ce);
    int ka, kb, kc;
    op  = op_e'($urandom_range(0, 15));
    if ($urandom_range(0, 3) != 0) op = op_e'($urandom_range(0, 3));   // favour fp arithmetic
    ka = $urandom_range(0, 5); kb = $urandom_range(0, 5); kc = $urandom_range(0, 5);
    if ($urandom_range(0, 3) == 0) begin ka = 0; kb = 0; kc = 0; end
    a = rnd_double(ka); b = rnd_double(kb); c = rnd_double(kc);
    imm = 16'($urandom);
    // cancellation: addend close to minus the (rounded) product / operand
    if ($urandom_range(0, 5) == 0) begin
      real p;
      logic [63:0] pb;
      if (op inside {OP_FADD, OP_FSUB}) begin
        b = a ^ (op == OP_FADD ? 64'h8000000000000000 : 64'h0);
        b[3:0] = 4'($urandom);
        if ($urandom_range(0, 1) == 0) b[62:52] = b[62:52] - 11'($urandom_range(0, 1));
      end else if (op == OP_FMULA) begin
        p  = $bitstoreal(a) * $bitstoreal(b);
        pb = $realtobits(p) ^ 64'h8000000000000000;
        pb[2:0] = 3'($urandom);
        c = pb;
      end
    end
    if (op inside {OP_ITOF, OP_IMUL, OP_HMUL}) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if ($urandom_range(0, 2) == 0) a = a >>> $urandom_range(0, 63);
      if ($urandom_range(0, 2) == 0) a = $signed(a) >>> $urandom_range(0, 63);
    end
    if (op inside {OP_FTOI, OP_FTOIU}) begin
      a[62:52] = 11'($urandom_range(1000, 1090));
      if ($urandom_range(0, 4) == 0) a = rnd_double(2);
      if ($urandom_range(0, 4) == 0) a[40:0] = '0;
    end
    ae = ($urandom_range(0, 60) == 0);
    be = ($urandom_range(0, 60) == 0);
    ce = ($urandom_range(0, 60) == 0);
  endtask

  initial begin
    op_e op;
    logic [63:0] a, b, c, d;
    logic [15:0] imm;
    logic ae, be, ce, e;
    logic [1:0] loose;
    int issued = 0;
    exp_t ex;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (issued < NOPS || q.size() != 0) begin
      @(negedge clk);
      stall = ($urandom_range(0, 9) == 0);
      if (stall && (dut.r1.v || dut.r2.v || dut.r3.v)) cnt_stall++;
      if (out_valid && !stall) consume();
      in_valid = 1'b0;
      if (!stall && issued < NOPS && $urandom_range(0, 9) < 8) begin
        // bursts of idle cycles let move/immediate operations feed through
        pick(op, a, b, c, imm, ae, be, ce);
        reference(op, a, b, c, imm, ae, be, ce, d, e, loose);
        ex.data = d; ex.err = e; ex.loose = loose; ex.op = op;
        ex.a = a; ex.b = b; ex.c = c;
        ex.adv_at_issue = adv_count;
        if (is_imm_path(op) && (!any_arith || adv_count - last_arith_adv > 3))
          ex.lat = 1;
        else begin
          ex.lat = 4;
          any_arith = 1'b1;
          last_arith_adv = adv_count;
        end
        // an err-val operand's word is expected unchanged; a fresh err-val
        // only needs its tag
        if (e && !(ae || (be && !(op inside {OP_MOV, OP_ITOF, OP_FTOI, OP_FTOIU})) ||
                   (ce && op == OP_FMULA))) ex.data = 0;
        q.push_back(ex);
        in_valid = 1'b1; in_op = op; in_a = a; in_b = b; in_c = c; in_imm = imm;
        in_a_err = ae; in_b_err = be; in_c_err = ce; in_ip = {$urandom, $urandom};
        issued++;
      end
    end
    $display("mechanisms: stall=%0d feedthrough=%0d mul_ovf_norm=%0d mul_round_up=%0d mul_tie=%0d",
             cnt_stall, cnt_feed, cnt_mulov, cnt_mround, cnt_mtie);
    $display("            add_round_up=%0d add_tie=%0d cancel=%0d neg=%0d sticky_mask=%0d",
             cnt_around, cnt_atie, cnt_cancel, cnt_neg, cnt_sticky);
    $display("            denormal=%0d overflow=%0d errgen=%0d errprop=%0d ftoi_lshift=%0d int=%0d",
             cnt_denorm, cnt_ovf, cnt_errgen, cnt_errprop, cnt_ftoi_big, cnt_int);
    $display("known double-rounding deviations: %0d", deviations);
    if (cnt_stall == 0 || cnt_feed == 0 || cnt_mulov == 0 || cnt_mround == 0 || cnt_mtie == 0 ||
        cnt_around == 0 || cnt_atie == 0 || cnt_cancel == 0 || cnt_neg == 0 || cnt_sticky == 0 ||
        cnt_denorm == 0 || cnt_ovf == 0 || cnt_errgen == 0 || cnt_errprop == 0 ||
        cnt_ftoi_big == 0 || cnt_int == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
