// push_unit: the push RS bank of a StreamEngine's communication unit.
//
// Each push RS watches one TDN slot for tokens of the producer instruction
// named by its tag and accepts those whose context (the actor iteration)
// lies in [iter_lo, iter_hi]. Several entries with the same tag and disjoint
// iteration ranges implement a weighted round-robin split; entries on
// different SEs writing disjoint ranges of one consumer channel implement a
// join. This is FIFO virtualization: one hardware channel holds several
// software FIFOs.
// Producers of one tag can finish iterations out of order (several RSs on
// different paths, or RSs of one bank served round-robin), so an accepted
// value is written into a reorder window of PUSH_Q places indexed by the low
// bits of its context. The entry sends the value of its next iteration (nx)
// as a DATA packet to channel address `index` of the consumer SE as soon as
// that value is present, so the consumer sees the stream in order.
// After each push, index advances by stride and wraps to ch_start once it
// passes ch_end; at every wrap the entry spends one credit. An entry with no
// credit does not push. Credits come back as CREDIT packets from the
// consumer's credit RS bank (matched by tag, consumer SE and channel range).
// Back pressure: an entry asks the dataflow monitor to stall every producer
// of its tag whose context is beyond the window (later than nx+PUSH_Q-1), so
// no value can arrive without a place. With no credit nx stops, the window
// fills and the producers stall.
// One packet leaves per cycle (round-robin among entries, valid/ready).
module push_unit
  import sw_pkg::*;
#(
  parameter int unsigned NENT     = N_PUSH,
  parameter int unsigned QDEPTH   = PUSH_Q
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [SE_ID_W-1:0]            my_id,
  input  logic                          cfg_we,
  input  logic [$clog2(NENT)-1:0]       cfg_idx,
  input  push_cfg_t                     cfg_in,
  input  token_t [NENT-1:0]             tok,
  output logic   [NENT-1:0][SLOT_W-1:0] slot_sel,
  input  logic                          credit_valid,
  input  pkt_t                          credit_pkt,
  output logic                          pkt_valid,
  output pkt_t                          pkt,
  input  logic                          pkt_ready,
  output sreq_t  [NENT-1:0]             sreq,
  output logic   [NENT-1:0]             pushed,
  output logic   [NENT-1:0]             wrapped,
  output logic   [NENT-1:0]             credit_stall,
  output logic   [NENT-1:0]             drop
);

  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned EW = (NENT > 1) ? $clog2(NENT) : 1;

  push_cfg_t          cfg [NENT];
  logic [DATA_W-1:0]  q   [NENT][QDEPTH];
  logic [QDEPTH-1:0]  qv  [NENT];
  logic [CTX_W-1:0]   nx  [NENT];
  logic [NENT-1:0]    hit, acc, cand, sel;
  logic [EW-1:0]      ptr;
  logic [NENT-1:0]    wrap;

  for (genvar e = 0; e < NENT; e++) begin : g_e
    logic [CTX_W-1:0] ahead;
    logic [QW-1:0]    wslot;
    assign ahead  = tok[e].ctx - nx[e];
    assign wslot = tok[e].ctx[QW-1:0];
    assign slot_sel[e] = cfg[e].slot;
    assign hit[e]  = cfg[e].valid && tok[e].valid && tok[e].tag == cfg[e].tag &&
                     tok[e].ctx >= cfg[e].iter_lo && tok[e].ctx <= cfg[e].iter_hi;
    assign acc[e]  = hit[e] && ahead < CTX_W'(QDEPTH) && !qv[e][wslot];
    assign drop[e] = hit[e] && !acc[e];
    assign wrap[e] = ({1'b0, cfg[e].index} + {1'b0, cfg[e].stride}) > {1'b0, cfg[e].ch_end};
    assign cand[e] = qv[e][nx[e][QW-1:0]] && (cfg[e].credit != '0);
    assign credit_stall[e] = cfg[e].valid && (cfg[e].credit == '0);
    assign sreq[e] = '{valid: cfg[e].valid, any: 1'b0, tag: cfg[e].tag,
                       ctx: nx[e] + CTX_W'(QDEPTH - 1)};
  end

  // round-robin choice of the entry that sends this cycle
  always_comb begin
    logic found;
    int unsigned k;
    found = 1'b0;
    sel   = '0;
    for (int unsigned j = 0; j < NENT; j++) begin
      k = (32'(ptr) + j) % NENT;
      if (!found && cand[k]) begin
        sel[k] = 1'b1;
        found  = 1'b1;
      end
    end
  end

  always_comb begin
    pkt       = '0;
    pkt_valid = |sel;
    for (int unsigned e = 0; e < NENT; e++)
      if (sel[e]) begin
        pkt.kind = PKT_DATA;
        pkt.dst  = cfg[e].cons_se;
        pkt.src  = my_id;
        pkt.addr = cfg[e].index;
        pkt.data = q[e][nx[e][QW-1:0]];
      end
  end

  assign pushed  = pkt_ready ? sel : '0;
  assign wrapped = pushed & wrap;

  always_ff @(posedge clk) begin
    for (int unsigned e = 0; e < NENT; e++)
      if (acc[e]) q[e][tok[e].ctx[QW-1:0]] <= tok[e].data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
      for (int unsigned e = 0; e < NENT; e++) begin
        cfg[e] <= '0;
        qv[e]  <= '0;
        nx[e]  <= '0;
      end
    end else begin
      for (int unsigned e = 0; e < NENT; e++) begin
        logic do_push, cr;
        logic [QDEPTH-1:0] v;
        logic [CH_AW:0] nidx;
        logic [7:0]     credit;
        do_push = sel[e] && pkt_ready;
        v       = qv[e];
        nidx    = {1'b0, cfg[e].index} + {1'b0, cfg[e].stride};
        cr      = credit_valid && credit_pkt.kind == PKT_CREDIT &&
                  credit_pkt.data[TAG_W-1:0] == cfg[e].tag &&
                  credit_pkt.src == cfg[e].cons_se &&
                  credit_pkt.addr >= cfg[e].ch_start && credit_pkt.addr <= cfg[e].ch_end;
        credit  = cfg[e].credit;
        if (do_push) begin
          cfg[e].index <= wrap[e] ? cfg[e].ch_start : nidx[CH_AW-1:0];
          if (wrap[e]) credit = credit - 1'b1;
          v[nx[e][QW-1:0]] = 1'b0;
          nx[e] <= nx[e] + 1'b1;
        end
        if (cr) credit = credit + 1'b1;
        cfg[e].credit <= credit;
        if (acc[e]) v[tok[e].ctx[QW-1:0]] = 1'b1;
        qv[e] <= v;
        if (clear) begin
          qv[e] <= '0;
          nx[e] <= cfg[e].iter_lo;
        end
        if (cfg_we && cfg_idx == e[EW-1:0]) begin
          cfg[e] <= cfg_in;
          qv[e]  <= '0;
          nx[e]  <= cfg_in.iter_lo;
        end
      end
      for (int unsigned e = 0; e < NENT; e++)
        if (sel[e] && pkt_ready) ptr <= EW'((e + 1) % NENT);
    end
  end

  for (genvar e = 0; e < NENT; e++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !drop[e])
      else $error("push_unit: token outside the reorder window");
  end

endmodule
