// rs_bank: a reservation-station bank (RSB) serving one functional unit or
// one port (ALU, multiplier, channel read port, SPM port).
//
// NRS reservation stations share the unit; at most one of them fires per
// cycle. Among the requesting RSs a round-robin arbiter picks one (the
// arbitration policy is this design's choice; the architecture only says
// exactly one RS fires per cycle). The granted RS's operation is presented
// combinationally on `iss`; the unit registers it.
// Per-RS configuration, context, operand-A value and stall requests are
// exported for the TDN switch, the dataflow monitor and the unit (a stream
// port checks the channel valid bit at the operand-A address through ext_ok).
module rs_bank
  import sw_pkg::*;
#(
  parameter int unsigned NRS = 8,
  parameter int unsigned NB  = NBUF
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         active,
  input  logic [NRS-1:0]               cfg_we,
  input  logic                         cfg_bank,
  input  rs_cfg_t                      cfg_in,
  input  token_t  [NRS-1:0]            tok_a,
  input  token_t  [NRS-1:0]            tok_b,
  input  token_t  [NRS-1:0]            tok_c,
  input  logic    [NRS-1:0]            stall,
  input  logic    [NRS-1:0]            ext_ok,
  output issue_t                       iss,
  output rs_cfg_t [NRS-1:0]            cfg,
  output logic    [NRS-1:0][CTX_W-1:0] ctx,
  output logic    [NRS-1:0][DATA_W-1:0] opa,
  output sreq_t   [3*NRS-1:0]          sreq,
  output logic    [NRS-1:0]            fired,
  output logic    [NRS-1:0]            idled,
  output logic    [NRS-1:0]            skipped,
  output logic    [NRS-1:0]            drop,
  output logic                         contention
);

  localparam int unsigned IW = (NRS > 1) ? $clog2(NRS) : 1;

  logic   [NRS-1:0] req, grant;
  issue_t [NRS-1:0] rs_iss;
  logic   [IW-1:0]  ptr;

  for (genvar i = 0; i < NRS; i++) begin : g_rs
    sreq_t [2:0] s;
    reservation_station #(.NB(NB)) u_rs (
      .clk, .rst_n, .clear, .active,
      .cfg_we(cfg_we[i]), .cfg_bank, .cfg_in,
      .tok_a(tok_a[i]), .tok_b(tok_b[i]), .tok_c(tok_c[i]),
      .stall(stall[i]), .ext_ok(ext_ok[i]), .grant(grant[i]),
      .req(req[i]), .iss(rs_iss[i]), .cfg(cfg[i]), .ctx(ctx[i]), .sreq(s),
      .fired(fired[i]), .idled(idled[i]), .skipped(skipped[i]), .drop(drop[i]));
    assign sreq[3*i +: 3] = s;
    assign opa[i] = rs_iss[i].a;
  end

  // round-robin arbiter: first requester at or after ptr
  always_comb begin
    logic found;
    int unsigned k;
    grant = '0;
    found = 1'b0;
    for (int unsigned j = 0; j < NRS; j++) begin
      k = (32'(ptr) + j) % NRS;
      if (!found && req[k]) begin
        grant[k] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  assign contention = |(req & ~grant);

  always_comb begin
    iss = '0;
    for (int unsigned i = 0; i < NRS; i++)
      if (grant[i]) iss = rs_iss[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (|grant) begin
      for (int unsigned i = 0; i < NRS; i++)
        if (grant[i]) ptr <= IW'((i + 1) % NRS);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("rs_bank: more than one RS fired");

endmodule
