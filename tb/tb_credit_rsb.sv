// tb_credit_rsb: self-checking test of the credit RS bank.
// Entry 0 watches channel words 0..7 and returns a credit to producer SE 5
// (tag 9) after every 8 reads; entry 1 watches 8..15 with a threshold of 4
// for SE 6 (tag 2). Reads arrive on both read ports, including two in one
// cycle and reads outside both ranges. The test checks the number, content
// and order of credit packets, that a credit packet appears in the cycle
// after the threshold is reached, and that back pressure keeps pending
// credits.
// The range/count/producer fields follow the architecture's credit
// instruction; the packet fields and timing are this design's.
`timescale 1ns/1ps
module tb_credit_rsb;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, cfg_we = 0;
  always #5 clk = ~clk;
  logic [1:0] cfg_idx = '0;
  credit_cfg_t cfg_in = '0;
  logic [N_STR-1:0] rd_done = '0;
  logic [N_STR-1:0][CH_AW-1:0] rd_addr = '0;
  logic pkt_valid, pkt_ready = 1;
  pkt_t pkt;
  logic [N_CREDIT-1:0] credit_sent;
  int checks = 0, failures = 0;
  credit_rsb dut (.clk, .rst_n, .clear, .my_id(8'd3), .cfg_we, .cfg_idx, .cfg_in,
                  .rd_done, .rd_addr, .pkt_valid, .pkt, .pkt_ready, .credit_sent);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int n5 = 0, n6 = 0;
  always begin
    @(negedge clk); #4;
    if (rst_n && pkt_valid && pkt_ready) begin
      check(pkt.kind == PKT_CREDIT && pkt.src == 8'd3, "credit packet kind and source");
      if (pkt.dst == 8'd5) begin n5++; check(pkt.addr == 0 && pkt.data == 9, "entry 0 packet fields"); end
      else begin n6++; check(pkt.dst == 8'd6 && pkt.addr == 8 && pkt.data == 2, "entry 1 packet fields"); end
    end
  end

  task automatic rd(int a0, int a1);
    rd_done = {a1 >= 0, a0 >= 0};
    rd_addr[0] = CH_AW'(a0 < 0 ? 0 : a0);
    rd_addr[1] = CH_AW'(a1 < 0 ? 0 : a1);
    @(negedge clk);
    rd_done = '0;
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    cfg_we = 1; cfg_idx = 0;
    cfg_in = '{valid: 1'b1, start: 9'd0, stop: 9'd7, max_cnt: 10'd8, prod_se: 8'd5, tag: 6'd9};
    @(negedge clk);
    cfg_idx = 1;
    cfg_in = '{valid: 1'b1, start: 9'd8, stop: 9'd15, max_cnt: 10'd4, prod_se: 8'd6, tag: 6'd2};
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < 6; i++) rd(i, 100);       // 6 in entry 0, 6 outside
    check(!pkt_valid, "no credit before the threshold");
    rd(6, 7);                                      // 8th read of entry 0
    #1 check(pkt_valid && pkt.dst == 8'd5, "credit in the cycle after the threshold");
    @(negedge clk);
    check(n5 == 1 && !pkt_valid, "one credit for entry 0");
    // back pressure: two credits of entry 1 wait while the port is busy
    pkt_ready = 0;
    for (int i = 0; i < 4; i++) rd(8 + i, 12 + i);  // 8 reads -> 2 credits
    repeat (3) @(negedge clk);
    check(pkt_valid && n6 == 0, "credits held under back pressure");
    pkt_ready = 1;
    repeat (4) @(negedge clk);
    check(n6 == 2 && !pkt_valid, "both pending credits sent");
    // clear drops partial counts
    rd(0, 1); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 6; i++) rd(i, -1);
    repeat (2) @(negedge clk);
    check(n5 == 1, "clear restarted the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
