// tb_rs_bank: self-checking test of an RS bank (8 RSs sharing one
// functional unit). Two RSs (ADD-immediate and SUB-immediate on the same
// input tag) become ready in the same cycles. The test checks that at most
// one RS issues per cycle, that contention is reported, that the
// round-robin arbiter alternates so both make progress, that the issued
// operands and contexts are right, and that with a single ready RS the bank
// issues on every cycle (rate of one instruction per cycle).
// One issue per cycle per bank follows the architecture; round-robin
// arbitration is this design's.
`timescale 1ns/1ps
module tb_rs_bank;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NRS = RS_ALU;
  logic clk = 0, rst_n = 0, clear = 0, active = 0, cfg_bank = 0;
  always #5 clk = ~clk;
  logic [NRS-1:0] cfg_we = '0, stall = '0, ext_ok = '1;
  rs_cfg_t cfg_in = '0;
  token_t [NRS-1:0] tok_a = '0, tok_b = '0, tok_c = '0;
  issue_t iss;
  rs_cfg_t [NRS-1:0] cfg;
  logic [NRS-1:0][CTX_W-1:0] ctx;
  logic [NRS-1:0][DATA_W-1:0] opa;
  sreq_t [3*NRS-1:0] sreq;
  logic [NRS-1:0] fired, idled, skipped, drop;
  logic contention;
  int checks = 0, failures = 0;
  rs_bank #(.NRS(NRS)) dut (.clk, .rst_n, .clear, .active, .cfg_we, .cfg_bank, .cfg_in,
                            .tok_a, .tok_b, .tok_c, .stall, .ext_ok, .iss, .cfg, .ctx, .opa,
                            .sreq, .fired, .idled, .skipped, .drop, .contention);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int n_add = 0, n_sub = 0, n_cont = 0, issue_cycles = 0;
  always begin
    @(negedge clk); #4;
    if (rst_n) begin
      check($onehot0(fired), "at most one issue per cycle");
      if (contention) n_cont++;
      if (iss.valid) begin
        issue_cycles++;
        if (iss.op == OP_ADD) begin
          check(iss.tag == 3 && iss.a == DATA_W'(n_add) && iss.b == 100 && iss.ctx == CTX_W'(n_add), "ADD operands");
          n_add++;
        end else begin
          check(iss.op == OP_SUB && iss.tag == 4 && iss.a == DATA_W'(n_sub) && iss.ctx == CTX_W'(n_sub), "SUB operands");
          n_sub++;
        end
      end
    end
  end

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    cfg_we = 8'b0000_0001; cfg_in = rs(OP_ADD, 3, 1, 0, -1, 0, 100); @(negedge clk);
    cfg_we = 8'b0000_0100; cfg_in = rs(OP_SUB, 4, 1, 0, -1, 0, 1);   @(negedge clk);
    cfg_we = '0;
    // four tokens of tag 1 reach both RSs
    for (int i = 0; i < 4; i++) begin
      tok_a[0] = '{valid: 1'b1, tag: 6'd1, ctx: CTX_W'(i), data: DATA_W'(i)};
      tok_a[2] = tok_a[0];
      @(negedge clk);
    end
    tok_a = '0;
    repeat (12) @(negedge clk);
    check(n_add == 4 && n_sub == 4, $sformatf("both RSs completed (%0d, %0d)", n_add, n_sub));
    check(n_cont > 0, "contention reported");
    check(ctx[0] == 8'd4 && ctx[2] == 8'd4, "contexts advanced");
    // one RS alone issues every cycle
    n_add = 0; n_sub = 0; issue_cycles = 0;
    cfg_we = 8'b0000_0001; cfg_in = rs(OP_ADD, 3, 1, 0, -1, 0, 100); @(negedge clk);
    cfg_we = '0;
    clear = 1; @(negedge clk); clear = 0;   // contexts restart at 0
    n_add = 0;
    for (int i = 0; i < 5; i++) begin
      tok_a[0] = '{valid: 1'b1, tag: 6'd1, ctx: CTX_W'(i), data: DATA_W'(i)};
      @(negedge clk);
    end
    tok_a = '0;
    repeat (3) @(negedge clk);
    check(n_add == 5 && issue_cycles == 5, "five issues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
