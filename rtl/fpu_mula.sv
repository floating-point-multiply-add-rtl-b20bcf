// FPU-MULA: fully pipelined IEEE double-precision multiply/add unit.
//
// One operation may issue every cycle and every arithmetic result appears
// four cycles later.  Multiply and add are fused end to end in one pipeline,
// with the product rounded to double precision before the add, so A*B+C gives
// exactly what a separate multiply and add would.  Add-type operations pass
// through the multiplier as A*1.0.
//
//   cycle 1  Booth encoding (radix 8, 22 partial products, 3A adder) and the
//            two 11-product carry-save multiplication arrays
//   cycle 2  array combination, multiplier add-and-round; product exponent
//   cycle 3  exponent compare, operand swap, alignment shift with sticky
//            mask (also the gradual-underflow shift of a tiny product)
//   cycle 4  three-way add with folded rounding, post-normalization,
//            special values, result select
//
// The original uses transparent latches and eight half-cycle stages; here
// each pair of half stages is one edge-triggered register stage, which keeps
// the four-cycle latency.  Beside the arithmetic pipeline run the
// immediate/move path (which feeds straight to the output when the pipeline
// is empty) and the err-val path.  `stall` freezes every stage; the issuer
// must hold its request while stalled.  Exponents are kept as 13-bit signed
// biased values; denormal operands use exponent 1 with a leading 0.
// Rounding is always round-to-nearest-even, including float-to-integer.
// NaN results (0*inf, inf-inf, NaN operands) and out-of-range conversions
// write an err-val (out_err = 1) instead of a value.
//
// Interface: in_* are sampled when in_valid & ~stall; out_* are valid for
// one cycle (while not stalled) when out_valid is high.
module fpu_mula
  import mula_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  input  logic        in_valid,
  input  op_e         in_op,
  input  logic [63:0] in_a,
  input  logic [63:0] in_b,
  input  logic [63:0] in_c,
  input  logic        in_a_err,
  input  logic        in_b_err,
  input  logic        in_c_err,
  input  logic [15:0] in_imm,
  input  logic [63:0] in_ip,
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_err
);
  localparam logic signed [XEXP_W-1:0] E_ONE   = 13'sd1;
  localparam logic signed [XEXP_W-1:0] E_FTOI  = 13'sd1075;  // BIAS + 52
  localparam logic signed [XEXP_W-1:0] E_ITOF  = 13'sd1086;  // BIAS + 63
  localparam logic signed [XEXP_W-1:0] E_MAX   = 13'sd2047;

  logic adv;
  assign adv = ~stall;

  // ------------------------------------------------------------------
  // operand decode (cycle 1)
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        sign;
    logic [10:0] e;
    logic [51:0] f;
  } dbl_t;

  dbl_t da, db, dc;
  assign da = in_a;
  assign db = in_b;
  assign dc = in_c;

  function automatic logic [XEXP_W-1:0] eff_exp(dbl_t d);
    return (d.e == 11'd0) ? 13'd1 : {2'b0, d.e};
  endfunction
  function automatic logic [52:0] sig(dbl_t d);
    return {d.e != 11'd0, d.f};
  endfunction
  function automatic logic is_nan(dbl_t d);
    return d.e == 11'h7FF && d.f != '0;
  endfunction
  function automatic logic is_inf(dbl_t d);
    return d.e == 11'h7FF && d.f == '0;
  endfunction
  function automatic logic is_zero(dbl_t d);
    return d.e == '0 && d.f == '0;
  endfunction

  logic        iss, iss_arith, iss_imm, pipe_empty;
  logic        op_mul, op_int, use_b, use_c;
  logic [63:0] mul_a;
  logic [65:0] mul_b;
  logic [65:0]  pp [22];
  logic [127:0] corr;
  logic [96:0]  as0, ac0, as1, ac1;

  // register stages of the arithmetic pipeline
  typedef struct packed {
    logic        v;
    op_e         op;
    logic        p_sign;
    logic signed [XEXP_W-1:0] p_exp;
    logic        p_nan, p_inf, p_zero;
    xfp_t        c;
    logic        c_nan, c_inf;
    logic [63:0] aux;        // ITOF operand or comparison result
    logic signed [XEXP_W-1:0] aux_exp;
  } s1_t;

  typedef struct packed {
    logic        v;
    op_e         op;
    xfp_t        p;
    xfp_t        c;
    logic        p_nan, p_inf, c_nan, c_inf;
    logic [63:0] data;       // integer/comparison result
  } s2_t;

  typedef struct packed {
    logic        v;
    op_e         op;
    logic signed [XEXP_W-1:0] e_more;
    logic        eff_sub, sign_more, p_sign, c_sign;
    logic [53:0] big, shifted;
    logic [2:0]  rgs;
    logic [3:0]  lsh;
    logic        lsh_ovf;
    logic        p_nan, p_inf, c_nan, c_inf;
    logic [63:0] data;
  } s3_t;

  s1_t r1, n1;
  s2_t r2, n2;
  s3_t r3, n3;
  logic [96:0]  r1_s0, r1_c0, r1_s1, r1_c1;
  logic [127:0] r1_corr;

  assign iss       = in_valid & adv;
  assign iss_imm   = iss & is_imm_path(in_op);
  assign iss_arith = iss & ~is_imm_path(in_op);
  assign pipe_empty = ~r1.v & ~r2.v & ~r3.v;

  // ITOF pre-normalization: 11-bit leading-zero count on the magnitude
  logic [63:0] itof_m;
  logic [3:0]  lz11;
  always_comb begin
    itof_m = in_a[63] ? (~in_a + 64'd1) : in_a;
    lz11 = 4'd11;
    for (int i = 52; i <= 63; i++)
      if (itof_m[i]) lz11 = 4'(63 - i);
  end

  // floating-point comparison
  logic cmp_lt, cmp_eq, cmp_un;
  always_comb begin
    cmp_un = is_nan(da) | is_nan(db);
    cmp_eq = (in_a == in_b) | (is_zero(da) & is_zero(db));
    if (is_zero(da) & is_zero(db))  cmp_lt = 1'b0;
    else if (da.sign != db.sign)    cmp_lt = da.sign;
    else if (!da.sign)              cmp_lt = in_a[62:0] < in_b[62:0];
    else                            cmp_lt = in_a[62:0] > in_b[62:0];
  end

  always_comb begin
    op_int = in_op inside {OP_IMUL, OP_HMUL};
    op_mul = in_op inside {OP_FMUL, OP_FMULA};
    use_b  = !(in_op inside {OP_MOV, OP_ITOF, OP_FTOI, OP_FTOIU, OP_FIMM, OP_FSHORU});
    use_c  = in_op == OP_FMULA;

    // multiplier operands: B's mantissa sits 12 places up
    if (op_int) begin
      mul_a = in_a;
      mul_b = {{2{in_b[63]}}, in_b};
    end else if (op_mul) begin
      mul_a = {11'b0, sig(da)};
      mul_b = {1'b0, sig(db), 12'b0};
    end else begin
      mul_a = {11'b0, sig(da)};
      mul_b = {1'b0, 53'h10000000000000, 12'b0};   // 1.0
    end

    n1         = '0;
    n1.v       = iss_arith;
    n1.op      = in_op;
    if (op_mul) begin
      n1.p_sign = da.sign ^ db.sign;
      n1.p_exp  = eff_exp(da) + eff_exp(db) - 13'sd1023;
      n1.p_nan  = is_nan(da) | is_nan(db) | (is_inf(da) & is_zero(db)) |
                  (is_zero(da) & is_inf(db));
      n1.p_inf  = is_inf(da) | is_inf(db);
      n1.p_zero = is_zero(da) | is_zero(db);
    end else if (in_op == OP_ITOF) begin
      n1.p_sign = in_a[63];     // an integer: no special values
    end else begin
      n1.p_sign = da.sign;
      n1.p_exp  = eff_exp(da);
      n1.p_nan  = is_nan(da);
      n1.p_inf  = is_inf(da);
      n1.p_zero = is_zero(da);
    end
    // addend
    unique case (in_op)
      OP_FADD, OP_FSUB: begin
        n1.c     = '{sign: db.sign ^ (in_op == OP_FSUB), exp: eff_exp(db),
                     mant: {sig(db), 11'b0}};
        n1.c_nan = is_nan(db);
        n1.c_inf = is_inf(db);
      end
      OP_FMULA: begin
        n1.c     = '{sign: dc.sign, exp: eff_exp(dc), mant: {sig(dc), 11'b0}};
        n1.c_nan = is_nan(dc);
        n1.c_inf = is_inf(dc);
      end
      OP_FTOI, OP_FTOIU:
        n1.c = '{sign: da.sign, exp: E_FTOI, mant: '0};
      OP_ITOF:
        n1.c = '{sign: in_a[63], exp: E_ITOF - signed'({9'b0, lz11}), mant: '0};
      default:   // FMUL and others: a zero of the product's sign
        n1.c = '{sign: n1.p_sign, exp: E_ONE, mant: '0};
    endcase
    // side results
    unique case (in_op)
      OP_ITOF: begin
        n1.aux     = itof_m << lz11;
        n1.aux_exp = E_ITOF - signed'({9'b0, lz11});
      end
      OP_FLT: n1.aux = {63'b0, ~cmp_un & cmp_lt};
      OP_FLE: n1.aux = {63'b0, ~cmp_un & (cmp_lt | cmp_eq)};
      OP_FEQ: n1.aux = {63'b0, ~cmp_un & cmp_eq};
      OP_FNE: n1.aux = {63'b0, cmp_un | ~cmp_eq};
      default: ;
    endcase
  end

  booth_pp_gen #(.NPP(22)) u_booth (.a(mul_a), .b(mul_b), .pp(pp), .corr(corr));
  mult_array #(.N(11)) u_arr0 (.pp(pp[0:10]),  .sum(as0), .carry(ac0));
  mult_array #(.N(11)) u_arr1 (.pp(pp[11:21]), .sum(as1), .carry(ac1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r1_s0 <= '0; r1_c0 <= '0; r1_s1 <= '0; r1_c1 <= '0; r1_corr <= '0;
    end else if (adv) begin
      r1 <= n1;
      r1_s0 <= as0; r1_c0 <= ac0; r1_s1 <= as1; r1_c1 <= ac1; r1_corr <= corr;
    end
  end

  // ------------------------------------------------------------------
  // cycle 2: array combination and multiplier rounding
  // ------------------------------------------------------------------
  logic [127:0] cs, cc;
  logic [63:0]  plo, phi;
  logic [52:0]  pm;
  logic [1:0]   padj;
  logic signed [XEXP_W-1:0] pe;

  array_combine u_comb (.s0(r1_s0), .c0(r1_c0), .s1(r1_s1), .c1(r1_c1),
                        .corr(r1_corr), .sum(cs), .carry(cc));
  mult_round u_mround (.sum(cs), .carry(cc), .is_int(r1.op inside {OP_IMUL, OP_HMUL}),
                       .prod_lo(plo), .prod_hi(phi), .mant(pm), .exp_adj(padj));

  always_comb begin
    pe        = r1.p_exp + signed'({11'b0, padj});
    n2        = '0;
    n2.v      = r1.v;
    n2.op     = r1.op;
    n2.c      = r1.c;
    n2.c_nan  = r1.c_nan;
    n2.c_inf  = r1.c_inf;
    n2.p_nan  = r1.p_nan;
    n2.p_inf  = r1.p_inf | (!r1.p_zero && !r1.p_nan && pe >= E_MAX);
    if (r1.op == OP_ITOF)
      n2.p = '{sign: r1.c.sign, exp: r1.aux_exp, mant: r1.aux};
    else if (r1.p_zero || r1.p_inf || r1.p_nan)
      n2.p = '{sign: r1.p_sign, exp: E_ONE, mant: '0};
    else
      n2.p = '{sign: r1.p_sign, exp: pe, mant: {pm, 11'b0}};
    unique case (r1.op)
      OP_IMUL: n2.data = plo;
      OP_HMUL: n2.data = phi;
      default: n2.data = r1.aux;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   r2 <= '0;
    else if (adv) r2 <= n2;
  end

  // ------------------------------------------------------------------
  // cycle 3: alignment
  // ------------------------------------------------------------------
  logic signed [XEXP_W-1:0] al_e_more;
  logic        al_swap, al_eff_sub, al_sign_more;
  logic [53:0] al_big, al_shifted;
  logic [2:0]  al_rgs;
  logic signed [XEXP_W-1:0] ftoi_up;

  align_shifter u_align (.p(r2.p), .c(r2.c), .e_more(al_e_more), .swap(al_swap),
                         .eff_sub(al_eff_sub), .sign_more(al_sign_more),
                         .big(al_big), .shifted(al_shifted), .rgs(al_rgs));

  always_comb begin
    ftoi_up     = r2.p.exp - E_FTOI;
    n3          = '0;
    n3.v        = r2.v;
    n3.op       = r2.op;
    n3.e_more   = al_e_more;
    n3.eff_sub  = al_eff_sub;
    n3.sign_more = al_sign_more;
    n3.p_sign   = r2.p.sign;
    n3.c_sign   = r2.c.sign;
    n3.big      = al_big;
    n3.shifted  = al_shifted;
    n3.rgs      = al_rgs;
    n3.lsh      = (ftoi_up > 0 && ftoi_up <= 13'sd11) ? ftoi_up[3:0] : 4'd0;
    n3.lsh_ovf  = ftoi_up > 13'sd11;
    n3.p_nan    = r2.p_nan;
    n3.p_inf    = r2.p_inf;
    n3.c_nan    = r2.c_nan;
    n3.c_inf    = r2.c_inf;
    n3.data     = r2.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   r3 <= '0;
    else if (adv) r3 <= n3;
  end

  // ------------------------------------------------------------------
  // cycle 4: add and round, post-normalize, result select
  // ------------------------------------------------------------------
  logic        is_ftoi;
  logic [55:0] ar_v;
  logic        ar_neg;
  logic [1:0]  pos_max;
  logic [52:0] pn_mant;
  logic signed [XEXP_W-1:0] pn_exp;
  logic [64:0] pn_int;
  logic [63:0] res;
  logic        gen;
  err_code_e   gen_code;
  logic        r_sign;

  assign is_ftoi = r3.op inside {OP_FTOI, OP_FTOIU};
  assign pos_max = (r3.e_more >= 13'sd3) ? 2'd3 : r3.e_more[1:0];

  add_round u_addr (.big(r3.big), .shifted(r3.shifted), .rgs(r3.rgs),
                    .eff_sub(r3.eff_sub), .fixed_r(is_ftoi), .pos_max(pos_max),
                    .v(ar_v), .neg(ar_neg));
  post_norm u_norm (.v(ar_v), .e_more(r3.e_more), .fixed_mode(is_ftoi),
                    .fix_lsh(r3.lsh), .mant(pn_mant), .exp(pn_exp), .int_out(pn_int));

  always_comb begin
    res      = r3.data;
    gen      = 1'b0;
    gen_code = ERR_NONE;
    r_sign   = r3.sign_more ^ ar_neg;
    unique case (r3.op)
      OP_FADD, OP_FSUB, OP_FMUL, OP_FMULA, OP_ITOF: begin
        if (r3.p_nan || r3.c_nan || (r3.p_inf && r3.c_inf && r3.eff_sub)) begin
          gen      = 1'b1;
          gen_code = ERR_INVALID;
        end else if (r3.p_inf || r3.c_inf) begin
          res = {r3.p_inf ? r3.p_sign : r3.c_sign, 11'h7FF, 52'b0};
        end else if (pn_mant == '0) begin
          res = {r3.eff_sub ? 1'b0 : r3.sign_more, 63'b0};
        end else if (pn_exp >= E_MAX) begin
          res = {r_sign, 11'h7FF, 52'b0};
        end else begin
          res = {r_sign, pn_exp[10:0], pn_mant[51:0]};
        end
      end
      OP_FTOI, OP_FTOIU: begin
        res = r3.p_sign ? (~pn_int[63:0] + 64'd1) : pn_int[63:0];
        if (r3.p_nan || r3.p_inf) begin
          gen      = 1'b1;
          gen_code = ERR_INVALID;
        end else if (r3.lsh_ovf || pn_int[64] ||
                     (r3.op == OP_FTOI && !r3.p_sign && pn_int[63]) ||
                     (r3.op == OP_FTOI && r3.p_sign && pn_int[63] && pn_int[62:0] != '0) ||
                     (r3.op == OP_FTOIU && r3.p_sign && pn_int != '0)) begin
          gen      = 1'b1;
          gen_code = ERR_CONVERT;
        end
      end
      default: ;
    endcase
  end

  // output stage: arithmetic result, immediate path and err-val path merge
  logic        ar_valid;
  logic [63:0] ar_data;
  logic        im_valid, im_err;
  logic [63:0] im_data;
  logic        ev_err;
  logic [63:0] ev_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_valid <= 1'b0;
      ar_data  <= '0;
    end else if (adv) begin
      ar_valid <= r3.v;
      ar_data  <= res;
    end
  end

  imm_path u_imm (.clk(clk), .rst_n(rst_n), .adv(adv), .issue(iss_imm), .op(in_op),
                  .a(in_a), .a_err(in_a_err), .imm(in_imm), .feed(pipe_empty),
                  .out_valid(im_valid), .out_data(im_data), .out_err(im_err));

  errval_path u_err (.clk(clk), .rst_n(rst_n), .adv(adv), .issue(iss_arith), .op(in_op),
                     .ip(in_ip), .use_b(use_b), .use_c(use_c),
                     .a(in_a), .b(in_b), .c(in_c),
                     .a_err(in_a_err), .b_err(in_b_err), .c_err(in_c_err),
                     .gen(gen), .gen_code(gen_code),
                     .out_err(ev_err), .out_word(ev_word));

  always_comb begin
    out_valid = ar_valid | im_valid;
    if (im_valid) begin
      out_data = im_data;
      out_err  = im_err;
    end else begin
      out_data = ev_err ? ev_word : ar_data;
      out_err  = ev_err;
    end
  end

  // the immediate path and the arithmetic pipeline never retire together
  a_one_retire: assert property (@(posedge clk) !(ar_valid && im_valid));
endmodule
