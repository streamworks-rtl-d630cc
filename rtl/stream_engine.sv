// stream_engine: one StreamEngine (SE), the processing element of StreamWorks.
//
// An SE runs one stream kernel as a locked dataflow graph. Every instruction
// of the kernel is configured once into a reservation station (RS) and stays
// there; it fires whenever its operands for its current context (iteration)
// are present, so successive iterations overlap without unrolling.
//
//   * 4 stream index generators (sig) are the roots of the graph.
//   * 2 stream RS banks issue RD/RMV reads on the input channel's two ports.
//   * 3 ALU banks (8 RS each) and 2 multiplier banks (4 RS each) feed
//     4-stage pipelined units.
//   * 2 LD/ST banks (4 RS each) access the 2 kB scratchpad (spm).
//   * The token distribution network (tdn) broadcasts each source's token in
//     its own slot; every operand selects one slot.
//   * The dataflow monitor (dfm) turns operand-buffer spill requests into
//     producer stalls.
//   * The communication unit is the input channel with its credit RS bank
//     (input_channel, credit_rsb) and the push unit (push_unit).
//
// Interface: `cfg` carries configuration writes from the control-plane
// processor (this SE reacts to writes whose `se` field equals my_id);
// in_*/out_* are the valid/ready packet ports to the cluster router;
// host_raddr/host_rdata read the scratchpad (1 cycle latency); `events`
// reports per-cycle activity.
// Timing: a token produced by an ALU/MUL appears on the TDN 4 cycles after
// the RS fires; SIG, channel and load tokens 1 cycle after. A consumer can
// fire the cycle after the token is on the TDN.
// Integer arithmetic only; the floating-point units are not implemented.
module stream_engine
  import sw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SE_ID_W-1:0] my_id,
  input  cfg_t               cfg,
  input  logic               in_valid,
  input  pkt_t               in_pkt,
  output logic               in_ready,
  output logic               out_valid,
  output pkt_t               out_pkt,
  input  logic               out_ready,
  input  logic [SPM_AW-1:0]  host_raddr,
  output logic [DATA_W-1:0]  host_rdata,
  output se_events_t         events
);

  localparam int unsigned NDST  = 3 * N_RS + N_PUSH;
  localparam int unsigned NPROD = N_RS + N_SIG;
  localparam int unsigned NREQ  = 3 * N_RS + N_PUSH;

  // ---------------- configuration decode ----------------
  logic hit, run, active, clear;
  assign hit   = cfg.valid && cfg.se == my_id;
  assign clear = hit && cfg.kind == CFG_CTRL && cfg.data[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      active <= 1'b0;
    end else if (hit && cfg.kind == CFG_CTRL) begin
      run    <= cfg.data[0];
      active <= cfg.data[1];
    end
  end

  logic [N_RS-1:0] rs_we;
  for (genvar i = 0; i < N_RS; i++) begin : g_we
    assign rs_we[i] = hit && cfg.kind == CFG_RS && 32'(cfg.idx) == i;
  end
  rs_cfg_t rs_cfg_in;
  assign rs_cfg_in = rs_cfg_t'(cfg.data[$bits(rs_cfg_t)-1:0]);

  // ---------------- token distribution network ----------------
  token_t [N_SLOT-1:0]          slots;
  logic   [NDST-1:0][SLOT_W-1:0] sel;
  token_t [NDST-1:0]            dtok;
  token_t [N_RS-1:0]            tok_a, tok_b, tok_c;
  rs_cfg_t [N_RS-1:0]           rcfg;
  logic   [N_PUSH-1:0][SLOT_W-1:0] push_sel;
  token_t [N_PUSH-1:0]          push_tok;

  for (genvar i = 0; i < N_RS; i++) begin : g_sel
    assign sel[3*i]     = rcfg[i].a_slot;
    assign sel[3*i + 1] = rcfg[i].b_slot;
    assign sel[3*i + 2] = rcfg[i].c_slot;
    assign tok_a[i]     = dtok[3*i];
    assign tok_b[i]     = dtok[3*i + 1];
    assign tok_c[i]     = dtok[3*i + 2];
  end
  for (genvar e = 0; e < N_PUSH; e++) begin : g_psel
    assign sel[3*N_RS + e] = push_sel[e];
    assign push_tok[e]     = dtok[3*N_RS + e];
  end

  tdn #(.NSRC(N_SLOT), .NDST(NDST)) u_tdn (.slot(slots), .sel(sel), .tok(dtok));

  // ---------------- dataflow monitor ----------------
  logic  [NPROD-1:0]            prod_valid, dstall;
  logic  [NPROD-1:0][TAG_W-1:0] prod_tag;
  logic  [NPROD-1:0][CTX_W-1:0] prod_ctx;
  sreq_t [NREQ-1:0]             sreqs;
  sreq_t [3*N_RS-1:0]           rs_sreq;
  sreq_t [N_PUSH-1:0]           push_sreq;
  logic  [N_RS-1:0][CTX_W-1:0]  rctx;
  sig_cfg_t [N_SIG-1:0]         scfg;
  logic  [N_SIG-1:0][CTX_W-1:0] sctx;

  for (genvar i = 0; i < N_RS; i++) begin : g_prs
    assign prod_valid[i] = rcfg[i].valid;
    assign prod_tag[i]   = rcfg[i].tag;
    assign prod_ctx[i]   = rctx[i];
  end
  for (genvar s = 0; s < N_SIG; s++) begin : g_psig
    assign prod_valid[N_RS + s] = scfg[s].valid;
    assign prod_tag[N_RS + s]   = scfg[s].tag;
    assign prod_ctx[N_RS + s]   = sctx[s];
  end
  assign sreqs = {push_sreq, rs_sreq};

  dfm #(.NPROD(NPROD), .NREQ(NREQ)) u_dfm (
    .prod_valid, .prod_tag, .prod_ctx, .req(sreqs), .stall(dstall));

  // ---------------- stream index generators ----------------
  for (genvar s = 0; s < N_SIG; s++) begin : g_sig
    sig u_sig (
      .clk, .rst_n, .clear, .run,
      .cfg_we(hit && cfg.kind == CFG_SIG && 32'(cfg.idx) == s),
      .cfg_in(sig_cfg_t'(cfg.data[$bits(sig_cfg_t)-1:0])),
      .stall(dstall[N_RS + s]), .cfg(scfg[s]), .ctx(sctx[s]),
      .tok(slots[SLOT_SIG + s]));
  end

  // ---------------- RS banks and units ----------------
  logic [N_RS-1:0][DATA_W-1:0] ropa;
  logic [N_RS-1:0]             ext_ok, fired, idled, skipped, rdrop;
  logic [8:0]                  contention;
  issue_t [N_STR-1:0]          str_iss;
  issue_t [N_LDST-1:0]         ls_iss;
  logic   [N_STR*RS_STR-1:0]   look_ok;
  logic   [N_STR*RS_STR-1:0][CH_AW-1:0] look_addr;
  logic                        spm_busy;

  for (genvar i = 0; i < N_STR * RS_STR; i++) begin : g_look
    assign look_addr[i]         = ropa[BASE_STR + i][CH_AW-1:0];
    assign ext_ok[BASE_STR + i] = look_ok[i];
  end
  assign ext_ok[BASE_LDST +: RS_LDST]                     = {RS_LDST{!spm_busy}};
  assign ext_ok[BASE_LDST + RS_LDST +: (N_LDST-1)*RS_LDST] = '1;
  assign ext_ok[BASE_ALU +: (N_ALU*RS_ALU + N_MUL*RS_MUL)] = '1;

  // one RS bank; B = first RS index, N = bank size, I = issue to the unit
  `define SW_RS_BANK(LBL, B, N, I, K) \
    rs_bank #(.NRS(N)) LBL ( \
      .clk, .rst_n, .clear, .active, .cfg_we(rs_we[(B) +: (N)]), .cfg_bank(cfg.bank), \
      .cfg_in(rs_cfg_in), .tok_a(tok_a[(B) +: (N)]), .tok_b(tok_b[(B) +: (N)]), \
      .tok_c(tok_c[(B) +: (N)]), .stall(dstall[(B) +: (N)]), .ext_ok(ext_ok[(B) +: (N)]), \
      .iss(I), .cfg(rcfg[(B) +: (N)]), .ctx(rctx[(B) +: (N)]), .opa(ropa[(B) +: (N)]), \
      .sreq(rs_sreq[3*(B) +: 3*(N)]), .fired(fired[(B) +: (N)]), .idled(idled[(B) +: (N)]), \
      .skipped(skipped[(B) +: (N)]), .drop(rdrop[(B) +: (N)]), .contention(contention[K]));

  for (genvar g = 0; g < N_STR; g++) begin : g_str
    `SW_RS_BANK(u_rsb, BASE_STR + g*RS_STR, RS_STR, str_iss[g], g)
  end

  for (genvar g = 0; g < N_ALU; g++) begin : g_alu
    issue_t iss;
    `SW_RS_BANK(u_rsb, BASE_ALU + g*RS_ALU, RS_ALU, iss, N_STR + g)
    alu u_alu (.clk, .rst_n, .iss(iss), .tok(slots[SLOT_ALU + g]));
  end

  for (genvar g = 0; g < N_MUL; g++) begin : g_mul
    issue_t iss;
    logic [DATA_W-1:0] acc;
    `SW_RS_BANK(u_rsb, BASE_MUL + g*RS_MUL, RS_MUL, iss, N_STR + N_ALU + g)
    mul u_mul (.clk, .rst_n, .iss(iss), .tok(slots[SLOT_MUL + g]), .acc(acc));
  end

  for (genvar g = 0; g < N_LDST; g++) begin : g_ls
    `SW_RS_BANK(u_rsb, BASE_LDST + g*RS_LDST, RS_LDST, ls_iss[g], N_STR + N_ALU + N_MUL + g)
  end

  `undef SW_RS_BANK

  // ---------------- scratchpad ----------------
  logic [N_LDST-1:0] stored;
  logic              spm_we;
  assign spm_we = hit && cfg.kind == CFG_SPM;

  spm u_spm (
    .clk, .rst_n, .iss(ls_iss), .tok(slots[SLOT_LD +: N_LDST]),
    .host_we(spm_we), .host_waddr(cfg.data[32 +: SPM_AW]), .host_wdata(cfg.data[31:0]),
    .port_busy(spm_busy), .host_raddr, .host_rdata, .stored);

  // ---------------- communication unit ----------------
  logic              chan_host_we, chan_we;
  logic [CH_AW-1:0]  chan_waddr;
  logic [DATA_W-1:0] chan_wdata;
  logic [N_STR-1:0]  rd_done;
  logic [N_STR-1:0][CH_AW-1:0] rd_addr;

  assign chan_host_we = hit && cfg.kind == CFG_CHAN;
  assign in_ready     = !chan_host_we;
  assign chan_we      = chan_host_we || (in_valid && in_ready && in_pkt.kind == PKT_DATA);
  assign chan_waddr   = chan_host_we ? cfg.data[32 +: CH_AW] : in_pkt.addr;
  assign chan_wdata   = chan_host_we ? cfg.data[31:0] : in_pkt.data;

  input_channel u_chan (
    .clk, .rst_n, .we(chan_we), .waddr(chan_waddr), .wdata(chan_wdata),
    .iss(str_iss), .look_addr, .look_ok, .tok(slots[SLOT_STR +: N_STR]),
    .rd_done, .rd_addr);

  logic       cr_valid, cr_ready, pu_valid, pu_ready;
  pkt_t       cr_pkt, pu_pkt;
  logic [N_CREDIT-1:0] credit_sent;
  logic [N_PUSH-1:0]   pushed, wrapped, credit_stall, pdrop;

  credit_rsb u_credit (
    .clk, .rst_n, .clear, .my_id,
    .cfg_we(hit && cfg.kind == CFG_CREDIT),
    .cfg_idx(cfg.idx[$clog2(N_CREDIT)-1:0]),
    .cfg_in(credit_cfg_t'(cfg.data[$bits(credit_cfg_t)-1:0])),
    .rd_done, .rd_addr, .pkt_valid(cr_valid), .pkt(cr_pkt), .pkt_ready(cr_ready),
    .credit_sent);

  push_unit u_push (
    .clk, .rst_n, .clear, .my_id,
    .cfg_we(hit && cfg.kind == CFG_PUSH),
    .cfg_idx(cfg.idx[$clog2(N_PUSH)-1:0]),
    .cfg_in(push_cfg_t'(cfg.data[$bits(push_cfg_t)-1:0])),
    .tok(push_tok), .slot_sel(push_sel),
    .credit_valid(in_valid && in_ready && in_pkt.kind == PKT_CREDIT), .credit_pkt(in_pkt),
    .pkt_valid(pu_valid), .pkt(pu_pkt), .pkt_ready(pu_ready),
    .sreq(push_sreq), .pushed, .wrapped, .credit_stall, .drop(pdrop));

  // credits go out ahead of data
  assign out_valid = cr_valid || pu_valid;
  assign out_pkt   = cr_valid ? cr_pkt : pu_pkt;
  assign cr_ready  = out_ready;
  assign pu_ready  = out_ready && !cr_valid;

  // ---------------- activity ----------------
  always_comb begin
    events              = '0;
    events.fire         = |fired;
    events.idle         = |idled;
    events.skip         = |skipped;
    events.contention   = |contention;
    events.rs_stall     = |(dstall[N_RS-1:0] & prod_valid[N_RS-1:0]);
    events.sig_stall    = run && |(dstall[NPROD-1:N_RS] & prod_valid[NPROD-1:N_RS]);
    events.push         = |pushed;
    events.push_wrap    = |wrapped;
    events.credit_stall = |credit_stall;
    events.credit_out   = |credit_sent;
    events.credit_in    = in_valid && in_ready && in_pkt.kind == PKT_CREDIT;
    events.drop         = |rdrop || |pdrop;
  end

endmodule
