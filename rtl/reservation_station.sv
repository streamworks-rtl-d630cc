// reservation_station: one locked instruction of a StreamEngine kernel.
//
// The instruction is written once by the control-plane processor and never
// retires: after each firing the RS increments its context (iteration id),
// clears its ready bits and reloads them from its operand buffers.
// Tag matching is distributed: each operand (rs_operand) snoops one TDN slot
// and keeps the tokens whose source tag matches, for the current or later
// contexts.
//
// Firing rule: operand A, operand B (unless an immediate is used) and the
// control operand (if the instruction is predicated) must be ready.
//  * control value == {0, path}: the RS requests its functional unit/port
//    (req); when granted it dispatches and advances.
//  * control value != {0, path}: the RS advances without dispatching ("idle").
//    A branch in a not-taken path instead dispatches a BR_SKIP so that the
//    instructions depending on it receive the control value 2'b11, which
//    matches neither path, and advance too.
// Requests are withheld while the dataflow monitor stalls this RS (stall) or
// the unit cannot serve the operation now (ext_ok = 0, e.g. an empty channel
// word for a stream read).
//
// Back pressure: an operand whose free buffers are not more than the
// worst-case number of tokens already in flight towards it (FU_DEPTH) asks
// the DFM to stall its producer; the DFM only stalls producers whose context
// is ahead of this RS, so the token the RS is waiting for still arrives.
// This threshold is this design's choice; the architecture only says the RS
// asks for a stall when a buffer is on the verge of spilling.
//
// Shadow RS: two configuration sets are held; `active` selects the kernel
// that executes. Only configuration is duplicated; operands and context are
// shared and are reset with `clear` on a kernel switch.
//
// Timing: req/iss are combinational from registered state and stall;
// the grant edge advances the context.
module reservation_station
  import sw_pkg::*;
#(
  parameter int unsigned NB       = NBUF,
  parameter int unsigned STALL_AT = FU_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             active,
  input  logic             cfg_we,
  input  logic             cfg_bank,
  input  rs_cfg_t          cfg_in,
  input  token_t           tok_a,
  input  token_t           tok_b,
  input  token_t           tok_c,
  input  logic             stall,
  input  logic             ext_ok,
  input  logic             grant,
  output logic             req,
  output issue_t           iss,
  output rs_cfg_t          cfg,
  output logic [CTX_W-1:0] ctx,
  output sreq_t [2:0]      sreq,
  output logic             fired,
  output logic             idled,
  output logic             skipped,
  output logic             drop
);

  rs_cfg_t cfg_q [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q[0] <= '0;
      cfg_q[1] <= '0;
    end else if (cfg_we) begin
      cfg_q[cfg_bank] <= cfg_in;
    end
  end

  assign cfg = cfg_q[active];

  logic                      a_rdy, b_rdy, c_rdy, adv;
  logic [DATA_W-1:0]         a_val, b_val;
  logic [1:0]                c_val;
  logic [$clog2(NB+1)-1:0]   a_free, b_free, c_free;
  logic                      a_drop, b_drop, c_drop;

  rs_operand #(.DW(DATA_W), .NB(NB)) u_opa (
    .clk, .rst_n, .clear, .en(cfg.valid), .src_tag(cfg.a_tag), .tok(tok_a),
    .cur_ctx(ctx), .advance(adv), .rdy(a_rdy), .val(a_val), .nfree(a_free), .drop(a_drop));
  rs_operand #(.DW(DATA_W), .NB(NB)) u_opb (
    .clk, .rst_n, .clear, .en(cfg.valid && cfg.b_valid), .src_tag(cfg.b_tag), .tok(tok_b),
    .cur_ctx(ctx), .advance(adv), .rdy(b_rdy), .val(b_val), .nfree(b_free), .drop(b_drop));
  rs_operand #(.DW(2), .NB(NB)) u_opc (
    .clk, .rst_n, .clear, .en(cfg.valid && cfg.c_valid), .src_tag(cfg.c_tag), .tok(tok_c),
    .cur_ctx(ctx), .advance(adv), .rdy(c_rdy), .val(c_val), .nfree(c_free), .drop(c_drop));

  logic all_rdy, take, br;
  assign all_rdy = cfg.valid && a_rdy && b_rdy && c_rdy;
  assign take    = !cfg.c_valid || (c_val == {1'b0, cfg.path});
  assign br      = is_branch(cfg.op);

  assign req   = all_rdy && (take || br) && !stall && ext_ok;
  assign idled = all_rdy && !take && !br;
  assign adv   = grant || idled;
  assign fired = grant;
  assign skipped = grant && !take;
  assign drop  = a_drop || b_drop || c_drop;

  always_comb begin
    iss       = '0;
    iss.valid = req;
    iss.op    = take ? cfg.op : OP_BR_SKIP;
    iss.tag   = cfg.tag;
    iss.ctx   = ctx;
    iss.a     = a_val;
    iss.b     = cfg.b_valid ? b_val : cfg.imm;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ctx <= '0;
    else if (clear)  ctx <= '0;
    else if (adv)    ctx <= ctx + 1'b1;
  end

  // stall requests towards the producers of each operand
  always_comb begin
    sreq[0] = '{valid: cfg.valid && (a_free <= STALL_AT[$bits(a_free)-1:0]),
                any: 1'b0, tag: cfg.a_tag, ctx: ctx};
    sreq[1] = '{valid: cfg.valid && cfg.b_valid && (b_free <= STALL_AT[$bits(b_free)-1:0]),
                any: 1'b0, tag: cfg.b_tag, ctx: ctx};
    sreq[2] = '{valid: cfg.valid && cfg.c_valid && (c_free <= STALL_AT[$bits(c_free)-1:0]),
                any: 1'b0, tag: cfg.c_tag, ctx: ctx};
  end

  // a grant is only given to a requesting RS
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req)
    else $error("reservation_station: grant without request");

endmodule
