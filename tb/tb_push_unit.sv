// tb_push_unit: self-checking test of the push RS bank.
// Entry 0 takes tag-5 tokens from slot 2 (all iterations) and pushes them to
// words 4..7 of SE 7's channel with one credit. Entry 1 takes tag-5 tokens
// of iterations 0..1 only (a split) and sends them to SE 9, words 0..1.
// Tokens arrive out of context order; the test checks that packets leave in
// iteration order with consecutive channel addresses, that the index wraps
// and spends the credit, that the entry stalls (no packet, credit_stall and
// a stall request) until a matching credit packet arrives, that the stall
// request names the end of the reorder window, and that at most one packet
// leaves per cycle.
// Split, join, index wrap and credit spending follow the architecture's
// push instruction; the reorder window is this design's.
`timescale 1ns/1ps
module tb_push_unit;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, cfg_we = 0;
  always #5 clk = ~clk;
  logic [2:0] cfg_idx = '0;
  push_cfg_t cfg_in = '0;
  token_t [N_PUSH-1:0] tok = '0;
  logic [N_PUSH-1:0][SLOT_W-1:0] slot_sel;
  logic credit_valid = 0, pkt_valid, pkt_ready = 1;
  pkt_t credit_pkt = '0, pkt;
  sreq_t [N_PUSH-1:0] sreq;
  logic [N_PUSH-1:0] pushed, wrapped, credit_stall, drop;
  int checks = 0, failures = 0;
  push_unit dut (.clk, .rst_n, .clear, .my_id(8'd1), .cfg_we, .cfg_idx, .cfg_in, .tok,
                 .slot_sel, .credit_valid, .credit_pkt, .pkt_valid, .pkt, .pkt_ready,
                 .sreq, .pushed, .wrapped, .credit_stall, .drop);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int got7 [$], addr7 [$], got9 [$], nwrap = 0;
  always begin
    @(negedge clk); #4;
    if (rst_n && pkt_valid && pkt_ready) begin
      check(pkt.kind == PKT_DATA && pkt.src == 8'd1, "data packet from this SE");
      if (pkt.dst == 8'd7) begin got7.push_back(int'(pkt.data)); addr7.push_back(int'(pkt.addr)); end
      else got9.push_back(int'(pkt.data));
      check($onehot(pushed), "one packet per cycle");
    end
    if (rst_n) nwrap += $countones(wrapped);
  end

  // token in the cycle: same token seen by both entries (both watch slot 2)
  task automatic send(int ctx);
    tok[0] = '{valid: 1'b1, tag: 6'd5, ctx: CTX_W'(ctx), data: DATA_W'(1000 + ctx)};
    tok[1] = tok[0];
    @(negedge clk);
    tok = '0;
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    cfg_we = 1; cfg_idx = 0;
    cfg_in = '{valid: 1'b1, tag: 6'd5, slot: 4'd2, iter_lo: 8'd0, iter_hi: 8'd255, cons_se: 8'd7,
               ch_start: 9'd4, ch_end: 9'd7, stride: 9'd1, index: 9'd4, credit: 8'd1};
    @(negedge clk);
    cfg_idx = 1;
    cfg_in = '{valid: 1'b1, tag: 6'd5, slot: 4'd2, iter_lo: 8'd0, iter_hi: 8'd1, cons_se: 8'd9,
               ch_start: 9'd0, ch_end: 9'd1, stride: 9'd1, index: 9'd0, credit: 8'd1};
    @(negedge clk); cfg_we = 0;
    check(slot_sel[0] == 4'd2, "slot select from configuration");
    check(sreq[0].valid && sreq[0].tag == 6'd5 && sreq[0].ctx == CTX_W'(PUSH_Q - 1),
          "stall request at the end of the reorder window");
    // out of order arrival: 1, 0, 3, 2, then 5, 4
    send(1);
    check(got7.size() == 0, "iteration 1 waits for iteration 0");
    send(0); send(3); send(2); send(5); send(4);
    repeat (4) @(negedge clk);
    check(got7.size() == 4, $sformatf("four pushes before the credit runs out, got %0d", got7.size()));
    for (int i = 0; i < got7.size(); i++) begin
      check(got7[i] == 1000 + i, $sformatf("push %0d carries iteration %0d", i, got7[i] - 1000));
      check(addr7[i] == 4 + i, "consecutive channel words");
    end
    check(nwrap >= 1, "index wrapped");
    check(credit_stall[0] && !pkt_valid, "no credit: entry stalls");
    check(got9.size() == 2 && got9[0] == 1000 && got9[1] == 1001, "split entry took iterations 0..1");
    // credit with a wrong tag is ignored, the right one releases the entry
    credit_valid = 1; credit_pkt = '{kind: PKT_CREDIT, dst: 8'd1, src: 8'd7, addr: 9'd4, data: 32'd6};
    @(negedge clk);
    credit_valid = 0;
    @(negedge clk);
    check(got7.size() == 4, "wrong-tag credit ignored");
    credit_valid = 1; credit_pkt.data = 32'd5;
    @(negedge clk);
    credit_valid = 0;
    repeat (3) @(negedge clk);
    check(got7.size() == 6 && got7[4] == 1004 && got7[5] == 1005 && addr7[4] == 4,
          "credit released iterations 4 and 5 at the start of the range");
    check(sreq[0].ctx == CTX_W'(6 + PUSH_Q - 1), "window moved with the pushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
