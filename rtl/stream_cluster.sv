// stream_cluster: a StreamCluster (SC) of eight StreamEngines.
//
// The eight SEs, each with its own scratchpad, are joined by a 9x9 router
// (the cluster's local communication fabric): every SE reaches every other
// SE in one hop, and port 8 leads to the next level of the fabric. A packet
// whose destination SE id has this cluster's number in its upper bits goes
// to the SE given by its lower 3 bits; anything else leaves through port 8.
// Configuration writes are broadcast to all SEs (each picks its own by id);
// host_rd_se/host_raddr select a scratchpad word, returned one cycle later.
// Not modelled: access by one SE to another SE's scratchpad, which the
// architecture allows within a cluster; SEs communicate only through their
// channels and push units here.
module stream_cluster
  import sw_pkg::*;
#(
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  cfg_t                            cfg,
  input  logic                            ext_in_valid,
  input  pkt_t                            ext_in_pkt,
  output logic                            ext_in_ready,
  output logic                            ext_out_valid,
  output pkt_t                            ext_out_pkt,
  input  logic                            ext_out_ready,
  input  logic [2:0]                      host_rd_se,
  input  logic [SPM_AW-1:0]               host_raddr,
  output logic [DATA_W-1:0]               host_rdata,
  output se_events_t [SE_PER_CLUSTER-1:0] events
);

  localparam int unsigned NP = SE_PER_CLUSTER + 1;
  localparam int unsigned PW = $clog2(NP);

  logic [NP-1:0]         r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  pkt_t [NP-1:0]         r_in_pkt, r_out_pkt;
  logic [NP-1:0][PW-1:0] r_in_port;
  logic [SE_PER_CLUSTER-1:0][DATA_W-1:0] rdata;

  for (genvar s = 0; s < SE_PER_CLUSTER; s++) begin : g_se
    stream_engine u_se (
      .clk, .rst_n,
      .my_id(SE_ID_W'(CLUSTER_ID * SE_PER_CLUSTER + s)),
      .cfg,
      .in_valid(r_out_valid[s]), .in_pkt(r_out_pkt[s]), .in_ready(r_out_ready[s]),
      .out_valid(r_in_valid[s]), .out_pkt(r_in_pkt[s]), .out_ready(r_in_ready[s]),
      .host_raddr, .host_rdata(rdata[s]), .events(events[s]));
  end

  assign r_in_valid[NP-1]  = ext_in_valid;
  assign r_in_pkt[NP-1]    = ext_in_pkt;
  assign ext_in_ready      = r_in_ready[NP-1];
  assign ext_out_valid     = r_out_valid[NP-1];
  assign ext_out_pkt       = r_out_pkt[NP-1];
  assign r_out_ready[NP-1] = ext_out_ready;

  for (genvar p = 0; p < NP; p++) begin : g_route
    assign r_in_port[p] = (32'(r_in_pkt[p].dst[SE_ID_W-1:3]) == CLUSTER_ID)
                          ? PW'(r_in_pkt[p].dst[2:0]) : PW'(NP - 1);
  end

  router #(.NP(NP)) u_router (
    .clk, .rst_n,
    .in_valid(r_in_valid), .in_pkt(r_in_pkt), .in_port(r_in_port), .in_ready(r_in_ready),
    .out_valid(r_out_valid), .out_pkt(r_out_pkt), .out_ready(r_out_ready));

  assign host_rdata = rdata[host_rd_se];

endmodule
