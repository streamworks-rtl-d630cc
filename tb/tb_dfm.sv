// tb_dfm: self-checking test of the dataflow monitor.
// Uses the full-size monitor (52 producers, 152 requests). Directed cases
// check the stall rule: a request stalls only producers with its tag whose
// context is later than the requester's, an `any` request stalls every
// producer of the tag, invalid producers and requests have no effect, and
// context comparison works across the wrap of the context counter. A set of
// pseudo-random cases (fixed LCG) is compared against a reference model.
// The later-context stall rule is the architecture's; sharing one context
// comparison per RS is this design's. The test is purely combinational.
`timescale 1ns/1ps
module tb_dfm;
  import sw_pkg::*;
  localparam int NP = N_RS + N_SIG, NR = 3 * N_RS + N_PUSH;
  logic  [NP-1:0]            prod_valid;
  logic  [NP-1:0][TAG_W-1:0] prod_tag;
  logic  [NP-1:0][CTX_W-1:0] prod_ctx;
  sreq_t [NR-1:0]            req;
  logic  [NP-1:0]            stall;
  int checks = 0, failures = 0;
  dfm dut (.prod_valid, .prod_tag, .prod_ctx, .req, .stall);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [NP-1:0] model();
    logic [NP-1:0] s;
    s = '0;
    for (int p = 0; p < NP; p++)
      for (int r = 0; r < NR; r++)
        if (prod_valid[p] && req[r].valid && req[r].tag == prod_tag[p] &&
            (req[r].any || $signed(prod_ctx[p] - req[r].ctx) > 0))
          s[p] = 1'b1;
    return s;
  endfunction

  int unsigned seed = 32'h1234_5678;
  function automatic int unsigned rnd();
    seed = seed * 1103515245 + 12345;
    return seed >> 8;
  endfunction

  task automatic clear_all();
    prod_valid = '0; prod_tag = '0; prod_ctx = '0; req = '0;
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    clear_all();
    // producers 0..2 carry tag 7 with contexts 4, 5, 6; producer 3 tag 8 ctx 9
    for (int p = 0; p < 3; p++) begin
      prod_valid[p] = 1; prod_tag[p] = 6'd7; prod_ctx[p] = CTX_W'(4 + p);
    end
    prod_valid[3] = 1; prod_tag[3] = 6'd8; prod_ctx[3] = 8'd9;
    #1 check(stall == '0, "no request, no stall");
    // operand b of RS 10 (request 31) waits on tag 7 at context 5
    req[31] = '{valid: 1'b1, any: 1'b0, tag: 6'd7, ctx: 8'd5};
    req[30].ctx = 8'd5; req[32].ctx = 8'd5;   // same RS, same context
    #1 check(stall[3:0] == 4'b0100, $sformatf("later-context rule, got %b", stall[3:0]));
    req[31].ctx = 8'd3; req[30].ctx = 8'd3; req[32].ctx = 8'd3;
    #1 check(stall[3:0] == 4'b0111, "all later producers stall");
    req[31].valid = 1'b0;
    req[NR-1] = '{valid: 1'b1, any: 1'b1, tag: 6'd8, ctx: 8'd0};
    #1 check(stall[3:0] == 4'b1000, "any-request stalls all of its tag");
    prod_valid[3] = 0;
    #1 check(stall[3] == 1'b0, "invalid producer never stalls");
    // context wrap: producer at 2 is later than a request at 250
    clear_all();
    prod_valid[0] = 1; prod_tag[0] = 6'd1; prod_ctx[0] = 8'd2;
    req[NR-2] = '{valid: 1'b1, any: 1'b0, tag: 6'd1, ctx: 8'd250};
    #1 check(stall[0] == 1'b1, "context comparison across wrap");
    // pseudo-random cases; the three requests of one RS share its context
    for (int n = 0; n < 200; n++) begin
      clear_all();
      for (int p = 0; p < NP; p++) begin
        prod_valid[p] = rnd() % 2; prod_tag[p] = TAG_W'(rnd() % 8); prod_ctx[p] = CTX_W'(rnd());
      end
      for (int g = 0; g < N_RS; g++) begin
        logic [CTX_W-1:0] c;
        c = CTX_W'(rnd());
        for (int k = 0; k < 3; k++)
          req[3*g+k] = '{valid: (rnd() % 8) == 0, any: 1'b0, tag: TAG_W'(rnd() % 8), ctx: c};
      end
      for (int r = 3 * N_RS; r < NR; r++)
        req[r] = '{valid: (rnd() % 4) == 0, any: rnd() % 2, tag: TAG_W'(rnd() % 8), ctx: CTX_W'(rnd())};
      #1 check(stall == model(), "random case against model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
