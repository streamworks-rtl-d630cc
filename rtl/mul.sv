// mul: integer multiplier of a StreamEngine with one accumulator,
// DEPTH-stage pipelined (4 by default).
//
// mult writes a*b to the result and to the accumulator; madd returns and
// stores acc + a*b; move passes operand A (for migrating values between
// banks). The product is formed in the first stage and the accumulation is
// done in the last stage, so back-to-back madd operations see each other's
// result without a stall. Issue in cycle t, token {tag, context, result}
// visible in its TDN slot in cycle t+DEPTH. Results are the low 32 bits.
// Only integer arithmetic is implemented; the single-precision floating
// point of the original datapath is not.
module mul
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = FU_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  issue_t iss,
  output token_t tok,
  output logic [DATA_W-1:0] acc
);

  typedef struct packed {
    logic              valid;
    opcode_e           op;
    logic [TAG_W-1:0]  tag;
    logic [CTX_W-1:0]  ctx;
    logic [DATA_W-1:0] p;
  } mstage_t;

  mstage_t st [DEPTH-1];
  token_t  out_q;
  logic [DATA_W-1:0] res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH-1; k++) st[k] <= '0;
    end else begin
      st[0] <= '{valid: iss.valid, op: iss.op, tag: iss.tag, ctx: iss.ctx,
                 p: (iss.op == OP_MOVE) ? iss.a : iss.a * iss.b};
      for (int k = 1; k < DEPTH-1; k++) st[k] <= st[k-1];
    end
  end

  always_comb begin
    case (st[DEPTH-2].op)
      OP_MADD: res = acc + st[DEPTH-2].p;
      default: res = st[DEPTH-2].p;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      acc   <= '0;
    end else begin
      out_q <= '{valid: st[DEPTH-2].valid, tag: st[DEPTH-2].tag,
                 ctx: st[DEPTH-2].ctx, data: res};
      if (st[DEPTH-2].valid && st[DEPTH-2].op inside {OP_MULT, OP_MADD})
        acc <= res;
    end
  end

  assign tok = out_q;

endmodule
