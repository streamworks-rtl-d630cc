// tb_alu: self-checking test of the integer ALU pipeline.
// Issues each opcode with chosen operands, checks the result value, tag and
// context, and checks that the token appears exactly FU_DEPTH cycles after
// issue (the pipeline depth of the main configuration). Also checks back-to-back issue
// (one result per cycle) and the BR_SKIP / branch encodings.
// The four-cycle latency comes from the architecture's pipeline depth and
// the 0/1/3 branch encodings from its predication scheme; the integer
// operation set is this design's.
`timescale 1ns/1ps
module tb_alu;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss = '0;
  token_t tok;
  localparam int N_BURST = 6;
  int checks = 0, failures = 0;
  int cyc = 0, seen_cyc [int], seen_val [int];
  always @(posedge clk) begin
    cyc++;
    if (tok.valid) begin seen_cyc[int'(tok.ctx)] = cyc; seen_val[int'(tok.ctx)] = int'(tok.data); end
  end
  alu dut (.clk, .rst_n, .iss, .tok);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic one(opcode_e op, int a, int b, int exp);
    int lat;
    @(negedge clk);
    iss = '{valid: 1'b1, op: op, tag: 6'd9, ctx: 8'd17, a: DATA_W'(a), b: DATA_W'(b)};
    @(negedge clk); iss = '0;
    lat = 1;
    while (!tok.valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == FU_DEPTH, $sformatf("%s latency %0d", op.name(), lat));
    check(tok.data == DATA_W'(exp) && tok.tag == 6'd9 && tok.ctx == 8'd17,
          $sformatf("%s(%0d,%0d) = %0d expected %0d", op.name(), a, b, tok.data, exp));
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    one(OP_ADD, 7, 5, 12);   one(OP_SUB, 7, 9, -2);   one(OP_AND, 12, 10, 8);
    one(OP_OR, 12, 3, 15);   one(OP_XOR, 12, 10, 6);  one(OP_SLL, 3, 4, 48);
    one(OP_SRL, 48, 4, 3);   one(OP_SLT, -1, 1, 1);   one(OP_MOVE, 42, 0, 42);
    one(OP_BEQ, 4, 4, 1);    one(OP_BNE, 4, 4, 0);    one(OP_BGE, 3, 4, 0);
    one(OP_BLT, 3, 4, 1);    one(OP_BEQZ, 0, 0, 1);   one(OP_BNEZ, 0, 0, 0);
    one(OP_BLTZ, -3, 0, 1);  one(OP_BGEZ, -3, 0, 0);  one(OP_BR_SKIP, 1, 1, 3);
    // back-to-back: one result per cycle
    @(negedge clk);
    seen_cyc.delete();
    for (int i = 0; i < N_BURST; i++) begin
      iss = '{valid: 1'b1, op: OP_ADD, tag: 6'd1, ctx: 8'(i), a: DATA_W'(i), b: DATA_W'(100)};
      @(negedge clk);
    end
    iss = '0;
    repeat (FU_DEPTH + 2) @(negedge clk);
    for (int i = 0; i < N_BURST; i++) begin
      check(seen_cyc.exists(i) && seen_val[i] == 100 + i, "pipelined result value");
      if (i > 0) check(seen_cyc.exists(i) && seen_cyc[i] == seen_cyc[i-1] + 1, "one result per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
