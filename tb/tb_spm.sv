// tb_spm: self-checking test of the dual-port scratchpad.
// Writes words from the host side and with ST issues on both ports, reads
// them back with LD issues and the host read port, and checks that an LD
// returns its token (tag, context, data) exactly one cycle after issue.
// The 2 kB size and two LD/ST ports follow the architecture; host-write
// priority and one-cycle load timing are this design's.
`timescale 1ns/1ps
module tb_spm;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t [N_LDST-1:0] iss = '0;
  token_t [N_LDST-1:0] tok;
  logic host_we = 0, port_busy;
  logic [SPM_AW-1:0] host_waddr = '0, host_raddr = '0;
  logic [DATA_W-1:0] host_wdata = '0, host_rdata;
  logic [N_LDST-1:0] stored;
  int checks = 0, failures = 0;
  spm dut (.clk, .rst_n, .iss, .tok, .host_we, .host_waddr, .host_wdata, .port_busy,
           .host_raddr, .host_rdata, .stored);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // host writes words 0..7
    for (int i = 0; i < 8; i++) begin
      host_we = 1; host_waddr = SPM_AW'(i); host_wdata = DATA_W'(100 + i);
      #1 check(port_busy, "host write occupies port 0");
      @(negedge clk);
    end
    host_we = 0;
    // both ports store at once: port 0 -> 300+i, port 1 -> 500+i
    for (int i = 0; i < 4; i++) begin
      iss[0] = '{valid: 1'b1, op: OP_ST, tag: 6'd1, ctx: 8'(i), a: DATA_W'(777 + i), b: DATA_W'(300 + i)};
      iss[1] = '{valid: 1'b1, op: OP_ST, tag: 6'd2, ctx: 8'(i), a: DATA_W'(888 + i), b: DATA_W'(500 - 256 + i)};
      #1 check(stored == 2'b11, "both ports store");
      @(negedge clk);
    end
    iss = '0;
    // loads on both ports; the token comes one cycle after issue
    for (int i = 0; i < 4; i++) begin
      iss[0] = '{valid: 1'b1, op: OP_LD, tag: 6'd3, ctx: 8'(i), a: DATA_W'(i), b: '0};
      iss[1] = '{valid: 1'b1, op: OP_LD, tag: 6'd4, ctx: 8'(i), a: DATA_W'(300 + i), b: '0};
      @(negedge clk);
      check(tok[0].valid && tok[0].tag == 6'd3 && tok[0].ctx == 8'(i) && tok[0].data == DATA_W'(100 + i),
            $sformatf("LD port 0 word %0d = %0d", i, tok[0].data));
      check(tok[1].valid && tok[1].tag == 6'd4 && tok[1].data == DATA_W'(777 + i),
            $sformatf("LD port 1 word %0d = %0d", 300 + i, tok[1].data));
    end
    iss = '0;
    @(negedge clk);
    check(!tok[0].valid && !tok[1].valid, "no token without a load");
    for (int i = 0; i < 4; i++) begin
      host_raddr = SPM_AW'(244 + i);
      @(negedge clk);
      check(host_rdata == DATA_W'(888 + i), $sformatf("host read %0d = %0d", 244 + i, host_rdata));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
