// credit_rsb: credit reservation-station bank of an input channel.
//
// Each entry mirrors one push instruction of a producer SE: it watches the
// channel address range [start, stop], counts the RD/RMV reads performed in
// that range, and when the count reaches max_cnt sends one credit back to
// the producer SE for the push instruction with the given tag. Credits wait
// in a per-entry counter until the fabric accepts the packet, so reads never
// stall. A credit packet carries the push tag in its data field and the
// range start in its address field; the producer uses both, plus the
// sender's SE id, to find the push entry (two push entries with the same tag
// and consumer are told apart by their channel range; the architecture does
// not say how, this is this design's choice).
// Entries are granted to the fabric in fixed priority order.
module credit_rsb
  import sw_pkg::*;
#(
  parameter int unsigned NENT  = N_CREDIT,
  parameter int unsigned NPORT = N_STR
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic [SE_ID_W-1:0]            my_id,
  input  logic                          cfg_we,
  input  logic [$clog2(NENT)-1:0]       cfg_idx,
  input  credit_cfg_t                   cfg_in,
  input  logic   [NPORT-1:0]            rd_done,
  input  logic   [NPORT-1:0][CH_AW-1:0] rd_addr,
  output logic                          pkt_valid,
  output pkt_t                          pkt,
  input  logic                          pkt_ready,
  output logic   [NENT-1:0]             credit_sent
);

  credit_cfg_t cfg [NENT];
  logic [CNT_W-1:0] cnt  [NENT];
  logic [7:0]       pend [NENT];
  logic [NENT-1:0]  sel;

  always_comb begin
    logic found;
    found = 1'b0;
    sel   = '0;
    for (int unsigned e = 0; e < NENT; e++)
      if (!found && pend[e] != 0) begin
        sel[e] = 1'b1;
        found  = 1'b1;
      end
  end

  always_comb begin
    pkt       = '0;
    pkt_valid = |sel;
    for (int unsigned e = 0; e < NENT; e++)
      if (sel[e]) begin
        pkt.kind = PKT_CREDIT;
        pkt.dst  = cfg[e].prod_se;
        pkt.src  = my_id;
        pkt.addr = cfg[e].start;
        pkt.data = DATA_W'(cfg[e].tag);
      end
  end

  assign credit_sent = pkt_ready ? sel : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < NENT; e++) begin
        cfg[e]  <= '0;
        cnt[e]  <= '0;
        pend[e] <= '0;
      end
    end else begin
      for (int unsigned e = 0; e < NENT; e++) begin
        logic [CNT_W:0] c;
        logic [7:0]     p;
        c = {1'b0, cnt[e]};
        p = pend[e];
        for (int unsigned q = 0; q < NPORT; q++)
          if (cfg[e].valid && rd_done[q] && rd_addr[q] >= cfg[e].start &&
              rd_addr[q] <= cfg[e].stop)
            c = c + 1'b1;
        if (cfg[e].valid && c >= {1'b0, cfg[e].max_cnt}) begin
          c = c - {1'b0, cfg[e].max_cnt};
          p = p + 1'b1;
        end
        if (sel[e] && pkt_ready) p = p - 1'b1;
        cnt[e]  <= c[CNT_W-1:0];
        pend[e] <= p;
        if (clear) begin
          cnt[e]  <= '0;
          pend[e] <= '0;
        end
        if (cfg_we && cfg_idx == e[$clog2(NENT)-1:0]) begin
          cfg[e]  <= cfg_in;
          cnt[e]  <= '0;
          pend[e] <= '0;
        end
      end
    end
  end

endmodule
