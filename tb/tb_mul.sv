// tb_mul: self-checking test of the integer multiplier pipeline.
// Checks MULT and MOVE results, the FU_DEPTH-cycle latency, the MADD
// accumulate (accumulator = sum of the products) and back-to-back issue.
// The four-cycle latency follows the architecture; the accumulator
// behaviour (MULT restarts it, MADD adds) is this design's.
`timescale 1ns/1ps
module tb_mul;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss = '0;
  token_t tok;
  logic [DATA_W-1:0] acc;
  localparam int N_BURST = 6;
  int checks = 0, failures = 0;
  int cyc = 0, seen_cyc [int], seen_val [int];
  always @(posedge clk) begin
    cyc++;
    if (tok.valid) begin seen_cyc[int'(tok.ctx)] = cyc; seen_val[int'(tok.ctx)] = int'(tok.data); end
  end
  mul dut (.clk, .rst_n, .iss, .tok, .acc);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic one(opcode_e op, int a, int b, int exp);
    int lat;
    @(negedge clk);
    iss = '{valid: 1'b1, op: op, tag: 6'd4, ctx: 8'd3, a: DATA_W'(a), b: DATA_W'(b)};
    @(negedge clk); iss = '0;
    lat = 1;
    while (!tok.valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == FU_DEPTH, $sformatf("%s latency %0d", op.name(), lat));
    check(tok.data == DATA_W'(exp) && tok.tag == 6'd4 && tok.ctx == 8'd3,
          $sformatf("%s(%0d,%0d) = %0d expected %0d", op.name(), a, b, tok.data, exp));
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    one(OP_MULT, 7, 6, 42);
    one(OP_MULT, -3, 5, -15);
    one(OP_MOVE, 99, 0, 99);
    one(OP_MULT, 4, 4, 16);       // accumulator restarts at 16
    one(OP_MADD, 2, 3, 22);       // 16 + 6
    one(OP_MADD, 10, 10, 122);    // 22 + 100
    check(acc == 32'd122, "accumulator value");
    @(negedge clk);
    seen_cyc.delete();
    for (int i = 0; i < N_BURST; i++) begin
      iss = '{valid: 1'b1, op: OP_MULT, tag: 6'd1, ctx: 8'(i), a: DATA_W'(i), b: DATA_W'(i)};
      @(negedge clk);
    end
    iss = '0;
    repeat (FU_DEPTH + 2) @(negedge clk);
    for (int i = 0; i < N_BURST; i++) begin
      check(seen_cyc.exists(i) && seen_val[i] == i * i, "pipelined result value");
      if (i > 0) check(seen_cyc.exists(i) && seen_cyc[i] == seen_cyc[i-1] + 1, "one result per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
