// tb_reservation_station: self-checking test of one reservation station.
// The RS holds ADD tag 3 with A from tag 1 and B from tag 2, both
// predicated on control tag 4 (path 1). Tokens arrive for several
// contexts ahead of time and out of order. The test checks that:
//  - the RS requests issue only when all operands of its current context are
//    present, issues the right operands and context, and advances;
//  - early tokens wait in the operand buffers and a stall request is raised
//    for an operand whose buffers are in use;
//  - an untaken path (control 0) idles without requesting and advances;
//  - a branch RS on an untaken path issues BR_SKIP;
//  - the DFM stall and a missing external condition block the request;
//  - the shadow configuration takes over when `active` flips, with the
//    context restarted by `clear`.
// Issue, idling and BR_SKIP follow the architecture; the stall threshold
// and the shadow-bank switch protocol are this design's. Inputs change on
// falling edges; results are checked after the next rising edge.
`timescale 1ns/1ps
module tb_reservation_station;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, active = 0, cfg_we = 0, cfg_bank = 0;
  always #5 clk = ~clk;
  rs_cfg_t cfg_in = '0, cfg;
  token_t tok_a = '0, tok_b = '0, tok_c = '0;
  logic stall = 0, ext_ok = 1, grant, req;
  issue_t iss;
  logic [CTX_W-1:0] ctx;
  sreq_t [2:0] sreq;
  logic fired, idled, skipped, drop;
  int checks = 0, failures = 0;
  reservation_station dut (.clk, .rst_n, .clear, .active, .cfg_we, .cfg_bank, .cfg_in,
                           .tok_a, .tok_b, .tok_c, .stall, .ext_ok, .grant, .req, .iss,
                           .cfg, .ctx, .sreq, .fired, .idled, .skipped, .drop);
  assign grant = req;   // single RS: always granted

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic put(int which, int tag, int c, int d);
    token_t t;
    t = '{valid: 1'b1, tag: TAG_W'(tag), ctx: CTX_W'(c), data: DATA_W'(d)};
    case (which) 0: tok_a = t; 1: tok_b = t; default: tok_c = t; endcase
  endtask

  task automatic cyc1();
    @(negedge clk); tok_a = '0; tok_b = '0; tok_c = '0;
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    cfg_we = 1; cfg_in = rs(OP_ADD, 3, 1, 0, 2, 0, 0, 4, 0, 1); @(negedge clk);
    cfg_bank = 1; cfg_in = rs(OP_BEQ, 5, 1, 0, 2, 0, 0, 4, 0, 1); @(negedge clk);
    cfg_we = 0; cfg_bank = 0;
    // context 0 operands and the context 1 A operand arrive early
    put(0, 1, 1, 11); cyc1();
    check(sreq[0].valid && sreq[0].tag == 6'd1 && sreq[0].ctx == 8'd0,
          "stall request while an operand buffer is in use");
    put(0, 1, 0, 10); put(1, 2, 0, 20); cyc1();
    check(!req, "waits for the control operand");
    put(2, 4, 0, 1); cyc1();
    check(req && iss.op == OP_ADD && iss.a == 10 && iss.b == 20 && iss.ctx == 0 && iss.tag == 3,
          "issues context 0 when all operands are present");
    cyc1();
    check(ctx == 8'd1, "advanced to context 1");
    // context 1: untaken path
    put(1, 2, 1, 21); put(2, 4, 1, 0); cyc1();
    check(!req && idled, "untaken path idles without a request");
    cyc1();
    check(ctx == 8'd2 && !sreq[0].valid, "idle advanced the context and freed the buffer");
    // stall and external condition
    put(0, 1, 2, 12); put(1, 2, 2, 22); put(2, 4, 2, 1); cyc1();
    stall = 1; #1 check(!req, "DFM stall blocks the request");
    stall = 0; ext_ok = 0; #1 check(!req, "external condition blocks the request");
    ext_ok = 1; #1 check(req && iss.a == 12 && iss.b == 22, "issues context 2 afterwards");
    cyc1();
    // shadow configuration: branch on an untaken path -> BR_SKIP
    active = 1; clear = 1; cyc1(); clear = 0;
    check(cfg.op == OP_BEQ && ctx == 8'd0, "shadow configuration active, context restarted");
    put(0, 1, 0, 5); put(1, 2, 0, 5); put(2, 4, 0, 0); cyc1();
    check(req && iss.op == OP_BR_SKIP && iss.tag == 6'd5, "untaken branch issues BR_SKIP");
    #1 check(skipped, "skip reported");
    cyc1();
    check(!drop, "no token lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
