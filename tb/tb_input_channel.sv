// tb_input_channel: self-checking test of the input channel.
// Writes words through the write port, checks their valid bits through the
// look-up ports, reads them with RD (valid bit kept) and RMV (valid bit
// cleared) on both ports, and checks that each read token (tag, context,
// data) appears one cycle after issue and that rd_done/rd_addr report the
// read to the credit logic. Also checks that a write wins over a same-cycle
// RMV of the same word.
// Valid bits and RD/RMV reads follow the architecture; the write-wins
// priority and one-cycle read timing are this design's.
`timescale 1ns/1ps
module tb_input_channel;
  import sw_pkg::*;
  localparam int NL = N_STR * RS_STR;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [CH_AW-1:0] waddr = '0;
  logic [DATA_W-1:0] wdata = '0;
  issue_t [N_STR-1:0] iss = '0;
  logic [NL-1:0][CH_AW-1:0] look_addr = '0;
  logic [NL-1:0] look_ok;
  token_t [N_STR-1:0] tok;
  logic [N_STR-1:0] rd_done;
  logic [N_STR-1:0][CH_AW-1:0] rd_addr;
  int checks = 0, failures = 0;
  input_channel dut (.clk, .rst_n, .we, .waddr, .wdata, .iss, .look_addr, .look_ok, .tok,
                     .rd_done, .rd_addr);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int l = 0; l < NL; l++) look_addr[l] = CH_AW'(l);
    #1 check(look_ok == '0, "channel empty after reset");
    for (int i = 0; i < 4; i++) begin
      we = 1; waddr = CH_AW'(i); wdata = DATA_W'(40 + i); @(negedge clk);
    end
    we = 0;
    #1 check(look_ok[3:0] == 4'hF && look_ok[NL-1:4] == '0, "valid bits of written words");
    // RD on port 0 keeps the word, RMV on port 1 removes it
    @(negedge clk);
    iss[0] = '{valid: 1'b1, op: OP_RD,  tag: 6'd3, ctx: 8'd0, a: 32'd1, b: '0};
    iss[1] = '{valid: 1'b1, op: OP_RMV, tag: 6'd4, ctx: 8'd0, a: 32'd2, b: '0};
    #1 check(rd_done == 2'b11 && rd_addr[0] == 1 && rd_addr[1] == 2, "reads reported to credit logic");
    @(negedge clk);
    iss = '0;
    check(tok[0].valid && tok[0].tag == 6'd3 && tok[0].data == 32'd41, "RD token after one cycle");
    check(tok[1].valid && tok[1].tag == 6'd4 && tok[1].data == 32'd42, "RMV token after one cycle");
    check(look_ok[1] && !look_ok[2], "RD keeps, RMV clears the valid bit");
    @(negedge clk);
    check(!tok[0].valid && !tok[1].valid, "no token without a read");
    // write and RMV of the same word in one cycle: the new word stays valid
    iss[0] = '{valid: 1'b1, op: OP_RMV, tag: 6'd3, ctx: 8'd1, a: 32'd3, b: '0};
    we = 1; waddr = CH_AW'(3); wdata = 32'd99;
    @(negedge clk);
    iss = '0; we = 0;
    check(tok[0].data == 32'd43, "RMV read the old word");
    check(look_ok[3], "write wins over same-cycle RMV");
    iss[1] = '{valid: 1'b1, op: OP_RMV, tag: 6'd4, ctx: 8'd1, a: 32'd3, b: '0};
    @(negedge clk);
    iss = '0;
    check(tok[1].data == 32'd99 && !look_ok[3], "new word read and removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
