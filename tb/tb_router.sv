// tb_router: self-checking test of the 9-port cluster router.
// Every input sends a fixed pseudo-random stream of packets to arbitrary
// outputs while the outputs apply random back pressure. Each received
// packet is checked against the per-(input, output) order of sending, all
// packets must arrive, a packet from an idle router must appear one cycle
// after acceptance, and with no back pressure every output must deliver a
// packet on every cycle when all inputs target distinct outputs.
// The 9 ports follow the architecture; arbitration and buffering are this
// design's. Handshakes are driven on falling edges and sampled just before
// rising edges.
`timescale 1ns/1ps
module tb_router;
  import sw_pkg::*;
  localparam int NP = 9, PW = 4, NPKT = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  pkt_t [NP-1:0] in_pkt = '0, out_pkt;
  logic [NP-1:0][PW-1:0] in_port = '0;
  int checks = 0, failures = 0, cyc = 0;
  router #(.NP(NP), .PW(PW)) dut (.clk, .rst_n, .in_valid, .in_pkt, .in_port, .in_ready,
                                  .out_valid, .out_pkt, .out_ready);
  always @(posedge clk) cyc++;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int unsigned seed = 32'h0BAD_5EED;
  function automatic int unsigned rnd();
    seed = seed * 1103515245 + 12345;
    return seed >> 8;
  endfunction

  int sent [NP][NP], rcvd [NP][NP], total_rx = 0;
  int unsigned dest [NP][NPKT];
  int k [NP];
  bit random_bp = 1;

  // receive side: data field = source*1000 + sequence number per (src, dst)
  // sampled just before each clock edge, when the handshake is decided
  always begin
    @(negedge clk); #4;
    if (rst_n) for (int o = 0; o < NP; o++)
      if (out_valid[o] && out_ready[o]) begin
        int s, q;
        s = int'(out_pkt[o].src);
        q = int'(out_pkt[o].data) % 1000;
        check(int'(out_pkt[o].dst) == o, "packet at the wrong output");
        check(q == rcvd[s][o], $sformatf("order %0d->%0d: got %0d expected %0d", s, o, q, rcvd[s][o]));
        rcvd[s][o]++;
        total_rx++;
      end
  end
  always @(negedge clk) if (random_bp) out_ready = NP'(rnd());

  initial begin #1000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < NP; i++) for (int n = 0; n < NPKT; n++) dest[i][n] = rnd() % NP;
    repeat (2) @(negedge clk); rst_n = 1;
    // one process per input
    for (int i = 0; i < NP; i++) begin
      fork
        automatic int ii = i;
        begin
          for (int n = 0; n < NPKT; n++) begin
            automatic int o;
            o = int'(dest[ii][n]);
            @(negedge clk);
            in_valid[ii] = 1;
            in_port[ii]  = PW'(o);
            in_pkt[ii]   = '{kind: PKT_DATA, dst: 8'(o), src: 8'(ii), addr: '0,
                            data: DATA_W'(ii * 1000 + sent[ii][o])};
            // sample ready just before the clock edge
            #4;
            while (!in_ready[ii]) begin @(negedge clk); #4; end
            @(posedge clk);
            sent[ii][o]++;
            #1 in_valid[ii] = 0;
          end
        end
      join_none
    end
    wait (total_rx == NP * NPKT);
    check(1, "all packets delivered");
    // latency and throughput: input i -> output (i+1)%NP, no back pressure
    random_bp = 0; out_ready = '1;
    repeat (3) @(negedge clk);
    begin
      int first, got;
      got = 0;
      for (int r = 0; r < 10; r++) begin
        for (int i = 0; i < NP; i++) begin
          int o;
          o = (i + 1) % NP;
          in_valid[i] = 1; in_port[i] = PW'(o);
          in_pkt[i] = '{kind: PKT_DATA, dst: 8'(o), src: 8'(i), addr: '0,
                        data: DATA_W'(i * 1000 + sent[i][o])};
          sent[i][o]++;
        end
        #4 check(in_ready == '1, "all distinct-output inputs accepted each cycle");
        @(posedge clk);
        @(negedge clk);
        check(out_valid == '1, $sformatf("every output delivers, one cycle after acceptance (%0d)", r));
      end
      in_valid = '0;
    end
    repeat (3) @(negedge clk);
    check(total_rx == NP * NPKT + 10 * NP, "all burst packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
