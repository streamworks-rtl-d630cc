// alu: integer ALU of a StreamEngine, DEPTH-stage pipelined (4 by default).
//
// Takes one operation per cycle from its RS bank and places the result as a
// token {tag, context, result} of the issuing instruction in its TDN slot
// DEPTH cycles later (issue in cycle t, token visible in cycle t+DEPTH).
// Operations: add, sub, and, or, xor, shifts, set-less-than, move (passes
// operand A so a value can migrate between banks), branch evaluations that
// produce 0 (not taken) or 1 (taken), and BR_SKIP, which produces 2'b11.
// Immediate forms (addi, andi, ...) arrive with the immediate in operand B.
// The result is computed in the first stage and carried through the rest.
// Only 32-bit integer operations are implemented; the floating-point
// operations of the original single-precision datapath are not.
module alu
  import sw_pkg::*;
#(
  parameter int unsigned DEPTH = FU_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  issue_t iss,
  output token_t tok
);

  function automatic logic [DATA_W-1:0] compute(issue_t i);
    logic signed [DATA_W-1:0] sa, sb;
    sa = i.a;
    sb = i.b;
    case (i.op)
      OP_ADD:     return i.a + i.b;
      OP_SUB:     return i.a - i.b;
      OP_AND:     return i.a & i.b;
      OP_OR:      return i.a | i.b;
      OP_XOR:     return i.a ^ i.b;
      OP_SLL:     return i.a << i.b[4:0];
      OP_SRL:     return i.a >> i.b[4:0];
      OP_SLT:     return {31'd0, sa < sb};
      OP_MOVE:    return i.a;
      OP_BEQ:     return {31'd0, i.a == i.b};
      OP_BNE:     return {31'd0, i.a != i.b};
      OP_BGE:     return {31'd0, sa >= sb};
      OP_BLT:     return {31'd0, sa < sb};
      OP_BEQZ:    return {31'd0, i.a == '0};
      OP_BNEZ:    return {31'd0, i.a != '0};
      OP_BLTZ:    return {31'd0, sa < 0};
      OP_BGEZ:    return {31'd0, sa >= 0};
      OP_BR_SKIP: return 32'd3;
      default:    return '0;
    endcase
  endfunction

  token_t pipe [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) pipe[k] <= '0;
    end else begin
      pipe[0] <= '{valid: iss.valid, tag: iss.tag, ctx: iss.ctx, data: compute(iss)};
      for (int k = 1; k < DEPTH; k++) pipe[k] <= pipe[k-1];
    end
  end

  assign tok = pipe[DEPTH-1];

endmodule
