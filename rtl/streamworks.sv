// streamworks: the StreamWorks dataplane co-processor.
//
// N_CLUSTERS StreamClusters of eight StreamEngines each. The ninth port of
// every cluster router is joined by a cluster-level router with one more
// port, which is the co-processor's external stream port: packets from
// outside (a stream source) enter there and packets addressed to an SE id
// beyond the last cluster (a stream sink) leave there. SE ids are
// {cluster, se[2:0]}.
// The control-plane processor (outside this design) configures every SE
// through `cfg` and reads scratchpads through host_rd_se/host_raddr
// (data one cycle later). `events` reports per-cycle activity of every SE.
// The cluster of eight SEs behind a 9-port router follows the
// architecture; one cluster is the default here, and the cluster count is a
// parameter because the architecture scales by adding clusters. The
// cluster-level router organisation is this design's choice.
// Timing: a packet takes one cycle per router it crosses (SE -> cluster
// router -> top router -> outside: two cycles after the SE sends it).
// Lint note: rst_n is the asynchronous reset of all registers and is also
// used in the `disable iff` of the simulation assertions; the linter
// reports that second use as a synchronous one. It has no circuit effect.
module streamworks
  import sw_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 1
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  cfg_t                                       cfg,
  input  logic                                       ext_in_valid,
  input  pkt_t                                       ext_in_pkt,
  output logic                                       ext_in_ready,
  output logic                                       ext_out_valid,
  output pkt_t                                       ext_out_pkt,
  input  logic                                       ext_out_ready,
  input  logic [SE_ID_W-1:0]                         host_rd_se,
  input  logic [SPM_AW-1:0]                          host_raddr,
  output logic [DATA_W-1:0]                          host_rdata,
  output se_events_t [N_CLUSTERS*SE_PER_CLUSTER-1:0] events
);

  localparam int unsigned NP = N_CLUSTERS + 1;
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;

  logic [NP-1:0]         g_in_valid, g_in_ready, g_out_valid, g_out_ready;
  pkt_t [NP-1:0]         g_in_pkt, g_out_pkt;
  logic [NP-1:0][PW-1:0] g_in_port;
  logic [N_CLUSTERS-1:0][DATA_W-1:0] rdata;

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cl
    stream_cluster #(.CLUSTER_ID(c)) u_cluster (
      .clk, .rst_n, .cfg,
      .ext_in_valid(g_out_valid[c]), .ext_in_pkt(g_out_pkt[c]), .ext_in_ready(g_out_ready[c]),
      .ext_out_valid(g_in_valid[c]), .ext_out_pkt(g_in_pkt[c]), .ext_out_ready(g_in_ready[c]),
      .host_rd_se(host_rd_se[2:0]), .host_raddr, .host_rdata(rdata[c]),
      .events(events[c*SE_PER_CLUSTER +: SE_PER_CLUSTER]));
  end

  assign g_in_valid[NP-1]  = ext_in_valid;
  assign g_in_pkt[NP-1]    = ext_in_pkt;
  assign ext_in_ready      = g_in_ready[NP-1];
  assign ext_out_valid     = g_out_valid[NP-1];
  assign ext_out_pkt       = g_out_pkt[NP-1];
  assign g_out_ready[NP-1] = ext_out_ready;

  for (genvar p = 0; p < NP; p++) begin : g_route
    assign g_in_port[p] = (32'(g_in_pkt[p].dst[SE_ID_W-1:3]) < N_CLUSTERS)
                          ? PW'(g_in_pkt[p].dst[SE_ID_W-1:3]) : PW'(NP - 1);
  end

  router #(.NP(NP), .PW(PW)) u_router (
    .clk, .rst_n,
    .in_valid(g_in_valid), .in_pkt(g_in_pkt), .in_port(g_in_port), .in_ready(g_in_ready),
    .out_valid(g_out_valid), .out_pkt(g_out_pkt), .out_ready(g_out_ready));

  assign host_rdata = rdata[32'(host_rd_se[SE_ID_W-1:3]) % N_CLUSTERS];

endmodule
