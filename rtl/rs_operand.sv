// rs_operand: one operand of a reservation station (A, B or control).
//
// Holds the operand for the RS's current context (the "ready" register) and
// NBUF operand buffers for tokens that arrived early, each with the context
// it belongs to. Every cycle the token on the TDN slot chosen for this
// operand is compared with the operand's source tag. A matching token for
// the current context sets the ready register; one for a later context is
// parked in a free buffer. When the RS fires (or idles) it advances its
// context and the buffer holding the next context, if any, moves into the
// ready register in the same edge, so an RS whose operands are buffered can
// fire again the following cycle. A token for the next context arriving in
// the advancing cycle goes straight to the ready register.
// If no buffer is free the token is lost and `drop` pulses; the dataflow
// monitor is meant to prevent that (see reservation_station).
// A disabled operand (en = 0) always reports ready.
module rs_operand
  import sw_pkg::*;
#(
  parameter int unsigned DW   = 32,
  parameter int unsigned NB   = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     en,
  input  logic [TAG_W-1:0]         src_tag,
  input  token_t                   tok,
  input  logic [CTX_W-1:0]         cur_ctx,
  input  logic                     advance,
  output logic                     rdy,
  output logic [DW-1:0]            val,
  output logic [$clog2(NB+1)-1:0]  nfree,
  output logic                     drop
);

  logic                 m_v, m_v_n;
  logic [DW-1:0]        m_d, m_d_n;
  logic [NB-1:0]        b_v, b_v_n;
  logic [CTX_W-1:0]     b_ctx   [NB];
  logic [CTX_W-1:0]     b_ctx_n [NB];
  logic [DW-1:0]        b_d     [NB];
  logic [DW-1:0]        b_d_n   [NB];

  always_comb begin
    logic [CTX_W-1:0] nctx;
    logic             match;
    logic             placed;
    m_v_n   = m_v;
    m_d_n   = m_d;
    b_v_n   = b_v;
    b_ctx_n = b_ctx;
    b_d_n   = b_d;
    drop    = 1'b0;
    placed  = 1'b0;
    nctx    = advance ? cur_ctx + 1'b1 : cur_ctx;
    if (advance) begin
      m_v_n = 1'b0;
      for (int i = 0; i < NB; i++) begin
        if (b_v[i] && b_ctx[i] == nctx) begin
          m_v_n    = 1'b1;
          m_d_n    = b_d[i];
          b_v_n[i] = 1'b0;
        end
      end
    end
    match = en && tok.valid && (tok.tag == src_tag);
    if (match) begin
      if (tok.ctx == nctx) begin
        m_v_n = 1'b1;
        m_d_n = tok.data[DW-1:0];
      end else if (ctx_gt(tok.ctx, nctx)) begin
        for (int i = 0; i < NB; i++) begin
          if (!placed && !b_v_n[i]) begin
            b_v_n[i]   = 1'b1;
            b_ctx_n[i] = tok.ctx;
            b_d_n[i]   = tok.data[DW-1:0];
            placed     = 1'b1;
          end
        end
        drop = !placed;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_v <= 1'b0;
      b_v <= '0;
    end else if (clear) begin
      m_v <= 1'b0;
      b_v <= '0;
    end else begin
      m_v <= m_v_n;
      b_v <= b_v_n;
    end
  end

  always_ff @(posedge clk) begin
    m_d   <= m_d_n;
    b_ctx <= b_ctx_n;
    b_d   <= b_d_n;
  end

  always_comb begin
    nfree = '0;
    for (int i = 0; i < NB; i++) nfree += {{($bits(nfree)-1){1'b0}}, !b_v[i]};
  end

  assign rdy = en ? m_v : 1'b1;
  assign val = m_d;

endmodule
