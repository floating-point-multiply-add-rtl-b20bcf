// Immediate and move path.
//
// MOV, FIMM and FSHORU need no arithmetic, so they travel down a separate
// chain of four registers that moves in step with the arithmetic pipeline
// and retires through the same output stage.  The value is formed on entry:
// MOV copies A, FIMM sign-extends the 16-bit immediate, and FSHORU shifts A
// left by 16 and ORs in the immediate (the 2-input mux on the chain's input).
// When nothing is in flight in the arithmetic pipeline (`feed` high) nor
// in the first three registers of this chain, the value skips the first three registers and lands directly in the fourth, so
// it retires one cycle after issue instead of four; retirement order is kept
// because nothing older is in flight.  `adv` low (a stall) holds every
// register.  A MOV of an err-val keeps the err-val tag.
//
// Following the original: four back-to-back registers, feed-through muxes
// and an input mux for the shift-and-OR.  Own choices: the exact
// feed-through condition, FIMM sign extension and the 16-bit FSHORU
// immediate.
module imm_path
  import mula_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,        // pipeline advances this cycle
  input  logic        issue,      // an immediate/move operation enters
  input  op_e         op,
  input  logic [63:0] a,
  input  logic        a_err,
  input  logic [15:0] imm,
  input  logic        feed,       // arithmetic pipeline empty: feed through
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_err
);
  typedef struct packed {
    logic        v;
    logic        err;
    logic [63:0] d;
  } ent_t;

  ent_t r [4];
  ent_t nxt;
  logic thru;   // feed through: nothing older in flight on either path

  assign thru = feed & ~r[0].v & ~r[1].v & ~r[2].v;

  always_comb begin
    nxt.v   = issue;
    nxt.err = 1'b0;
    unique case (op)
      OP_FIMM:   nxt.d = {{48{imm[15]}}, imm};
      OP_FSHORU: nxt.d = {a[47:0], imm};
      default: begin
        nxt.d   = a;
        nxt.err = a_err;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else if (adv) begin
      r[0] <= (issue && !thru) ? nxt : '0;
      r[1] <= r[0];
      r[2] <= r[1];
      r[3] <= (issue && thru) ? nxt : r[2];
    end
  end

  assign out_valid = r[3].v;
  assign out_data  = r[3].d;
  assign out_err   = r[3].err;
endmodule
