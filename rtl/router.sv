// router: NP x NP crossbar router of the communication fabric.
//
// A StreamCluster uses a 9-port instance: ports 0-7 connect its eight
// StreamEngines so that any SE reaches any other in one hop, and port 8
// connects to the next level of the fabric. The same module with
// N_CLUSTERS+1 ports joins clusters at the top level.
// Every input presents a packet with its already-computed output port
// (in_port). Each output has a two-packet output FIFO; among the inputs that
// want it, a round-robin arbiter picks one whenever the FIFO holds fewer
// than two packets. Because acceptance depends only on registered state,
// in_ready never depends combinationally on out_ready, so routers can be
// chained in any topology without combinational loops, while still passing
// one packet per cycle per output. Handshakes are valid/ready on both
// sides; a packet appears at the output one cycle after it is accepted.
// The architecture specifies the port count and the one-hop property; the
// arbitration and buffering here are this design's choices.
module router
  import sw_pkg::*;
#(
  parameter int unsigned NP = 9,
  parameter int unsigned PW = $clog2(NP)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NP-1:0]          in_valid,
  input  pkt_t [NP-1:0]          in_pkt,
  input  logic [NP-1:0][PW-1:0]  in_port,
  output logic [NP-1:0]          in_ready,
  output logic [NP-1:0]          out_valid,
  output pkt_t [NP-1:0]          out_pkt,
  input  logic [NP-1:0]          out_ready
);

  logic [NP-1:0][PW-1:0] ptr;
  logic [NP-1:0][NP-1:0] gnt;     // gnt[o][i]
  logic [NP-1:0]         load;
  pkt_t [NP-1:0]         fifo1;   // second FIFO place; place 0 is out_pkt
  logic [NP-1:0][1:0]    cnt;

  for (genvar o = 0; o < NP; o++) begin : g_out
    pkt_t in_sel;

    always_comb begin
      logic found;
      int unsigned k;
      found     = 1'b0;
      gnt[o]    = '0;
      for (int unsigned j = 0; j < NP; j++) begin
        k = (32'(ptr[o]) + j) % NP;
        if (!found && in_valid[k] && 32'(in_port[k]) == o && cnt[o] != 2'd2) begin
          gnt[o][k] = 1'b1;
          found     = 1'b1;
        end
      end
      load[o] = found;
      in_sel  = '0;
      for (int unsigned i = 0; i < NP; i++)
        if (gnt[o][i]) in_sel = in_pkt[i];
    end

    assign out_valid[o] = cnt[o] != 2'd0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_pkt[o] <= '0;
        fifo1[o]   <= '0;
        cnt[o]     <= '0;
        ptr[o]     <= '0;
      end else begin
        logic pop;
        pop = out_valid[o] && out_ready[o];
        // place 0 (out_pkt) is the head; place 1 holds the second packet
        if (pop) begin
          if (cnt[o] == 2'd2) out_pkt[o] <= fifo1[o];
          else if (load[o])   out_pkt[o] <= in_sel;
        end else if (load[o]) begin
          if (cnt[o] == 2'd0) out_pkt[o] <= in_sel;
          else                fifo1[o]   <= in_sel;
        end
        if (pop && load[o] && cnt[o] == 2'd2) fifo1[o] <= in_sel;
        cnt[o] <= cnt[o] + 2'(load[o]) - 2'(pop);
        for (int unsigned i = 0; i < NP; i++)
          if (gnt[o][i]) ptr[o] <= PW'((i + 1) % NP);
      end
    end
  end

  always_comb begin
    in_ready = '0;
    for (int unsigned o = 0; o < NP; o++) in_ready |= gnt[o];
  end

endmodule
