// Err-val path.
//
// The unit raises no exceptions; instead a faulty operation writes back an
// err-val, a tagged word that names where the fault happened.  A chain of
// four registers runs beside the arithmetic pipeline.  On issue it captures
// either the first err-val found among the operands actually used (A, then
// B, then C), or else a fresh err-val word made of the instruction pointer
// and status bits.  In the last cycle the arithmetic side reports whether
// the operation itself faulted (`gen`, with a cause code); the final
// register then holds the word to write back instead of the result and
// `out_err` says whether it must be used.
// Fresh err-val layout (this design's choice): bits 63:60 cause code,
// 59:56 operation code, 55:0 instruction pointer bits 55:0.
module errval_path
  import mula_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,
  input  logic        issue,
  input  op_e         op,
  input  logic [63:0] ip,
  input  logic        use_b,
  input  logic        use_c,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [63:0] c,
  input  logic        a_err,
  input  logic        b_err,
  input  logic        c_err,
  // fourth cycle: fault raised by the operation itself
  input  logic        gen,
  input  err_code_e   gen_code,
  output logic        out_err,
  output logic [63:0] out_word
);
  typedef struct packed {
    logic        v;
    logic        in_err;   // an operand was an err-val
    logic [63:0] w;
  } ent_t;

  ent_t r [3];
  ent_t nxt;

  always_comb begin
    nxt.v = issue;
    if (a_err) begin
      nxt.in_err = 1'b1;
      nxt.w      = a;
    end else if (use_b && b_err) begin
      nxt.in_err = 1'b1;
      nxt.w      = b;
    end else if (use_c && c_err) begin
      nxt.in_err = 1'b1;
      nxt.w      = c;
    end else begin
      nxt.in_err = 1'b0;
      nxt.w      = {ERR_NONE, op, ip[55:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) r[i] <= '0;
      out_err  <= 1'b0;
      out_word <= '0;
    end else if (adv) begin
      r[0] <= issue ? nxt : '0;
      r[1] <= r[0];
      r[2] <= r[1];
      out_err  <= r[2].v & (r[2].in_err | gen);
      out_word <= r[2].in_err ? r[2].w : {gen_code, r[2].w[59:0]};
    end
  end
endmodule
