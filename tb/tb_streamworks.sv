// tb_streamworks: end-to-end test of the StreamWorks co-processor at its
// default size (one cluster of eight StreamEngines).
//
// A two-kernel pipeline is configured by the test, acting as control-plane
// processor:
//   SE0: nested-conditional kernel. Two interleaved input streams a, b are
//        read with RMV from its channel; out = a > b ? a : (a == b ? a + b : b),
//        computed with bge / beq predication (BR_SKIP on the untaken path).
//        Results are pushed into SE1's channel (words 0..15, one credit).
//   SE1: reads with RMV, squares the value (multiplier), stores it in its
//        scratchpad at the iteration index and pushes it to the external
//        port (a stream sink, words 0..15, one credit).
// The test is the stream source (it writes SE0's channel through the
// external port, 32 words per batch, and waits for SE0's credit before the
// next batch) and the stream sink (it checks every result in order and
// returns a credit after each 16). After the first phase SE1 switches to
// its shadow RS configuration (out = 3 * value) and the second phase checks
// the new results.
// Every mechanism must occur at least once: RS firing, untaken-path idling,
// BR_SKIP, bank contention, DFM stalls of RSs and SIGs, push, push index
// wrap, credit stall, credit send/receive and the kernel switch; no token
// may be lost.
// The kernels exercise mechanisms the architecture names (predication,
// BR_SKIP, dataflow stalls, push, credits, shadow RS); the kernels, packet
// format and configuration protocol are this design's. All timing is
// measured in clock cycles of the single clock; handshakes are sampled
// just before rising edges.
`timescale 1ns/1ps
module tb_streamworks;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  localparam int EXT = 8'hF8;
  localparam int N1  = 6;      // batches (16 iterations each) in phase 1
  localparam int N2  = 3;      // batches in phase 2
  localparam int NSE = SE_PER_CLUSTER;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg = '0;
  logic ext_in_valid = 0, ext_in_ready, ext_out_valid;
  pkt_t ext_in_pkt = '0, ext_out_pkt;
  logic [SE_ID_W-1:0] host_rd_se = '0;
  logic [SPM_AW-1:0]  host_raddr = '0;
  logic [DATA_W-1:0]  host_rdata;
  se_events_t [NSE-1:0] events;

  streamworks dut (.clk, .rst_n, .cfg, .ext_in_valid, .ext_in_pkt, .ext_in_ready,
                   .ext_out_valid, .ext_out_pkt, .ext_out_ready(1'b1),
                   .host_rd_se, .host_raddr, .host_rdata, .events);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(cfg_t w);
    @(negedge clk); cfg = w; @(posedge clk); #1 cfg = '0;
  endtask

  // ---------------- stimulus and reference ----------------
  int in_a [$], in_b [$];
  int exp_q [$], exp_all [$];
  bit phase2 = 0;
  int src_credit = 1;
  int n_out = 0, sink_cnt = 0, switches = 0;

  function automatic int kernel0(int a, int b);
    return (a > b) ? a : ((a == b) ? a + b : b);
  endfunction

  // external port: source credits, sink data
  // sampled just before each clock edge, when the handshake is decided
  always begin
    @(negedge clk); #4;
    if (rst_n && ext_out_valid) begin
    if (ext_out_pkt.kind == PKT_CREDIT) begin
      check(ext_out_pkt.src == 0 && ext_out_pkt.data == 0, "credit to source from wrong SE/tag");
      src_credit++;
    end else begin
      int e;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : -1;
      check(ext_out_pkt.src == 1, "sink data from wrong SE");
      check(ext_out_pkt.addr == CH_AW'(n_out % 16), "sink address");
      check(ext_out_pkt.data == DATA_W'(e),
            $sformatf("result %0d = %0d, expected %0d", n_out, ext_out_pkt.data, e));
      n_out++;
      sink_cnt++;
    end
    end
  end

  // sink returns one credit per 16 words
  // the source and the sink share the external input port
  bit port_lock = 0;
  task automatic lock_port();
    @(negedge clk);
    while (port_lock) @(negedge clk);
    port_lock = 1;
  endtask

  task automatic sink_credit();
    lock_port();
    ext_in_pkt   = '{kind: PKT_CREDIT, dst: 8'd1, src: 8'(EXT), addr: '0, data: 32'd3};
    ext_in_valid = 1;
    #4;   // sample ready just before the clock edge
    while (!ext_in_ready) begin @(negedge clk); #4; end
    @(posedge clk);
    #1 ext_in_valid = 0;
    port_lock = 0;
  endtask

  task automatic send_batch();
    int a, b;
    while (src_credit == 0) @(posedge clk);
    src_credit--;
    for (int j = 0; j < 16; j++) begin
      a = $urandom_range(0, 7);
      b = $urandom_range(0, 7);
      exp_q.push_back(phase2 ? 3 * kernel0(a, b) : kernel0(a, b) * kernel0(a, b));
      exp_all.push_back(exp_q[$]);
      for (int w = 0; w < 2; w++) begin
        lock_port();
        ext_in_pkt   = '{kind: PKT_DATA, dst: 8'd0, src: 8'(EXT), addr: CH_AW'(2*j + w),
                         data: DATA_W'(w == 0 ? a : b)};
        ext_in_valid = 1;
        #4;   // sample ready just before the clock edge
    while (!ext_in_ready) begin @(negedge clk); #4; end
    @(posedge clk);
        #1 ext_in_valid = 0;
        port_lock = 0;
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int c_fire, c_idle, c_skip, c_cont, c_rss, c_sgs, c_push, c_wrap, c_cst, c_cout, c_cin, c_drop;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSE; s++) begin
      c_fire += int'(events[s].fire);       c_idle += int'(events[s].idle);
      c_skip += int'(events[s].skip);       c_cont += int'(events[s].contention);
      c_rss  += int'(events[s].rs_stall);   c_sgs  += int'(events[s].sig_stall);
      c_push += int'(events[s].push);       c_wrap += int'(events[s].push_wrap);
      c_cst  += int'(events[s].credit_stall); c_cout += int'(events[s].credit_out);
      c_cin  += int'(events[s].credit_in);  c_drop += int'(events[s].drop);
    end
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog: %0d results received", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sink_seen = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- SE0: nested conditional kernel ----
    wr(w_credit(0, 0, 0, 31, 32, EXT, 0));
    wr(w_sig(0, 0, 1, 0, 2, 31, 0));
    wr(w_sig(0, 1, 2, 1, 2, 31, 0));
    wr(w_rs(0, i_str(0,0), rs(OP_RMV,  3, 1, s_sig(0))));
    wr(w_rs(0, i_str(1,0), rs(OP_RMV,  4, 2, s_sig(1))));
    wr(w_rs(0, i_alu(0,0), rs(OP_BGE,  5, 3, s_str(0), 4, s_str(1))));
    wr(w_rs(0, i_alu(0,1), rs(OP_BEQ,  6, 3, s_str(0), 4, s_str(1), 0, 5, s_alu(0), 1)));
    wr(w_rs(0, i_alu(1,0), rs(OP_MOVE, 7, 4, s_str(1), -1, 0, 0, 5, s_alu(0), 0)));
    wr(w_rs(0, i_alu(1,1), rs(OP_MOVE, 7, 3, s_str(0), -1, 0, 0, 6, s_alu(0), 0)));
    wr(w_rs(0, i_alu(1,2), rs(OP_ADD,  7, 3, s_str(0), 4, s_str(1), 0, 6, s_alu(0), 1)));
    wr(w_push(0, 0, 7, s_alu(1), 0, 255, 1, 0, 15, 1, 0, 1));
    // ---- SE1: square, store, push out; shadow bank: times 3 ----
    wr(w_credit(1, 0, 0, 15, 16, 0, 7));
    wr(w_sig(1, 0, 1, 0, 1, 15, 0));
    wr(w_rs(1, i_str(0,0),  rs(OP_RMV,  2, 1, s_sig(0))));
    wr(w_rs(1, i_mul(0,0),  rs(OP_MULT, 3, 2, s_str(0), 2, s_str(0))));
    wr(w_rs(1, i_ldst(0,0), rs(OP_ST,   4, 3, s_mul(0), 1, s_sig(0))));
    wr(w_rs(1, i_str(0,0),  rs(OP_RMV,  2, 1, s_sig(0)), 1));
    wr(w_rs(1, i_mul(0,0),  rs(OP_MULT, 3, 2, s_str(0), -1, 0, 3), 1));
    wr(w_rs(1, i_ldst(0,0), rs(OP_ST,   4, 3, s_mul(0), 1, s_sig(0)), 1));
    wr(w_push(1, 0, 3, s_mul(0), 0, 255, EXT, 0, 15, 1, 0, 1));
    wr(w_ctrl(0, 1, 0, 0));
    wr(w_ctrl(1, 1, 0, 0));

    // ---- phase 1 ----
    fork
      for (int n = 0; n < N1; n++) send_batch();
      for (int n = 0; n < N1; n++) begin
        wait (sink_cnt >= 16);
        sink_cnt -= 16;
        sink_credit();
      end
    join
    wait (n_out == 16 * N1);
    repeat (20) @(posedge clk);
    // scratchpad of SE1 holds the squares of the last batch
    for (int i = 0; i < 16; i++) begin
      host_rd_se <= 8'd1;
      host_raddr <= SPM_AW'(i);
      @(posedge clk); @(posedge clk);
      check(host_rdata == DATA_W'(exp_all[16*(N1-1) + i]),
            $sformatf("SE1 scratchpad[%0d] = %0d, expected %0d", i, host_rdata,
                      exp_all[16*(N1-1) + i]));
    end
    check(exp_q.size() == 0, "phase 1 results missing");

    // ---- kernel switch on SE1 to its shadow configuration ----
    phase2 = 1;
    wr(w_ctrl(1, 1, 1, 1));
    switches++;
    fork
      for (int n = 0; n < N2; n++) send_batch();
      for (int n = 0; n < N2; n++) begin
        wait (sink_cnt >= 16);
        sink_cnt -= 16;
        sink_credit();
      end
    join
    wait (n_out == 16 * (N1 + N2));
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "phase 2 results missing");

    $display("events: fire=%0d idle=%0d skip=%0d contention=%0d rs_stall=%0d sig_stall=%0d push=%0d wrap=%0d credit_stall=%0d credit_out=%0d credit_in=%0d switch=%0d drop=%0d cycles=%0d",
             c_fire, c_idle, c_skip, c_cont, c_rss, c_sgs, c_push, c_wrap, c_cst, c_cout, c_cin, switches, c_drop, cyc);
    check(c_fire > 0, "no RS firing");
    check(c_idle > 0, "no untaken-path idle");
    check(c_skip > 0, "no BR_SKIP");
    check(c_cont > 0, "no bank contention");
    check(c_rss  > 0, "no DFM stall of an RS");
    check(c_sgs  > 0, "no DFM stall of a SIG");
    check(c_push > 0, "no push");
    check(c_wrap > 0, "no push index wrap");
    check(c_cst  > 0, "no credit stall");
    check(c_cout > 0, "no credit sent");
    check(c_cin  > 0, "no credit received");
    check(switches > 0, "no kernel switch");
    check(c_drop == 0, "tokens lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
