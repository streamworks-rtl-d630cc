// tb_stream_cluster: self-checking test of one StreamCluster (eight SEs and
// the 9-port router).
// SE2 generates the index stream 0..15 (repeating) with its SIG and pushes it
// into words 0..15 of SE5's channel with one credit. SE5 reads each word with
// RMV, adds 1000 on its ALU and pushes the result out of the cluster to an
// external sink; SE5's credit RS bank returns a credit to SE2 after every 16
// reads. The test checks every result and its channel address in order, that
// credits travel SE5 -> SE2 through the router, and that the other SEs stay
// idle.
// Eight engines and a 9-port router follow the architecture; packet
// format, routing and credits details are this design's.
`timescale 1ns/1ps
module tb_stream_cluster;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int EXT = 8'hF8, NRES = 48;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg = '0;
  logic ext_in_ready, ext_out_valid;
  pkt_t ext_out_pkt;
  logic [DATA_W-1:0] host_rdata;
  se_events_t [SE_PER_CLUSTER-1:0] events;
  int checks = 0, failures = 0, cyc = 0;
  stream_cluster dut (.clk, .rst_n, .cfg, .ext_in_valid(1'b0), .ext_in_pkt('0), .ext_in_ready,
                      .ext_out_valid, .ext_out_pkt, .ext_out_ready(1'b1),
                      .host_rd_se(3'd5), .host_raddr('0), .host_rdata, .events);
  always @(posedge clk) cyc++;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(cfg_t w);
    @(negedge clk); cfg = w; @(posedge clk); #1 cfg = '0;
  endtask

  int n_out = 0, cr2 = 0, cr5 = 0, other = 0, first = -1;
  always begin
    @(negedge clk); #4;
    if (rst_n && ext_out_valid) begin
      check(ext_out_pkt.kind == PKT_DATA && ext_out_pkt.src == 8'd5 && ext_out_pkt.dst == 8'(EXT),
            "packet leaves the cluster from SE5");
      check(ext_out_pkt.data == DATA_W'(1000 + n_out % 16) && ext_out_pkt.addr == CH_AW'(n_out % 16),
            $sformatf("result %0d = %0d at %0d", n_out, ext_out_pkt.data, ext_out_pkt.addr));
      if (first < 0) first = cyc;
      n_out++;
    end
    if (rst_n) begin
      cr2 += int'(events[2].credit_in);
      cr5 += int'(events[5].credit_out);
      for (int s = 0; s < SE_PER_CLUSTER; s++)
        if (s != 2 && s != 5 && (events[s].fire || events[s].push)) other++;
    end
  end

  initial begin #300000; $display("watchdog: %0d results", n_out); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wr(w_sig(2, 0, 1, 0, 1, 15, 0));
    wr(w_push(2, 0, 1, s_sig(0), 0, 255, 5, 0, 15, 1, 0, 1));
    wr(w_credit(5, 0, 0, 15, 16, 2, 1));
    wr(w_sig(5, 0, 1, 0, 1, 15, 0));
    wr(w_rs(5, i_str(0,0), rs(OP_RMV, 2, 1, s_sig(0))));
    wr(w_rs(5, i_alu(0,0), rs(OP_ADD, 3, 2, s_str(0), -1, 0, 1000)));
    wr(w_push(5, 0, 3, s_alu(0), 0, 255, EXT, 0, 15, 1, 0, 8));
    wr(w_ctrl(5, 1, 0, 0));
    wr(w_ctrl(2, 1, 0, 0));
    wait (n_out == NRES);
    $display("%0d results, first at cycle %0d, last at %0d", NRES, first, cyc);
    check(cr5 >= 2 && cr2 >= 2, $sformatf("credits SE5 -> SE2 (%0d sent, %0d received)", cr5, cr2));
    check(other == 0, "other SEs idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
