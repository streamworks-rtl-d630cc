// tb_stream_engine: runs the difference-of-squares example kernel on one
// StreamEngine at its full configuration.
//   isig i0: 0,2,127   isig i1: 1,2,127        (64 iterations)
//   rd r4,i0 ; rd r5,i1                         (stream banks 0 and 1)
//   add r6=r4+r5 (ALU0) ; sub r7=r4-r5 (ALU1) ; andi r8=r6&63 (ALU0)
//   mul r9=r6*r7 (MUL0) ; st r9,[r8]            (LD/ST bank 0)
// The channel holds channel[x] = 2x. Iteration k stores -2*(8k+2) at
// (8k+2)&63; the last iteration writing an address wins. The generators
// repeat the index range, so iteration j uses k = j mod 64; after stopping
// the generators the test drains the engine and checks the scratchpad
// against every store that happened. The test checks the
// scratchpad after the first 64 iterations, that stores happen in context
// order, and that 64 iterations complete within 160 cycles of the first
// store (ALU0 executes two instructions per iteration, so the bound is two
// cycles per iteration plus slack).
// The kernel and the engine size follow the architecture's example and
// main configuration; the IPC bound checked is this design's target.
`timescale 1ns/1ps
module tb_stream_engine;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid = 0, in_ready, out_valid;
  pkt_t in_pkt = '0, out_pkt;
  logic [SPM_AW-1:0] host_raddr = '0;
  logic [DATA_W-1:0] host_rdata;
  se_events_t ev;

  stream_engine dut (.clk, .rst_n, .my_id(8'd0), .cfg, .in_valid, .in_pkt, .in_ready,
                     .out_valid, .out_pkt, .out_ready(1'b1), .host_raddr, .host_rdata,
                     .events(ev));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic wr(cfg_t w);
    @(negedge clk); cfg = w; @(posedge clk); #1 cfg = '0;
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // store monitor: LD/ST bank 0 issue
  int nst = 0, first_st = -1, last_ctx = -1, order_err = 0, ncomp = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.ls_iss[0].valid && dut.ls_iss[0].op == OP_ST) begin
      if (first_st < 0) first_st = cyc;
      if (int'(dut.ls_iss[0].ctx) != (nst % 256)) order_err++;
      nst++;
      if (nst == 64) $display("64 iterations stored by cycle %0d (first at %0d)", cyc, first_st);
    end
    if (nst < 64) ncomp += $countones(dut.fired[BASE_ALU +: N_ALU*RS_ALU + N_MUL*RS_MUL]);
  end
  int t64 = -1;
  always @(posedge clk) if (nst == 64 && t64 < 0) t64 = cyc;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int x = 0; x < 128; x++) wr(w_mem(0, CFG_CHAN, x, 2*x));
    wr(w_sig(0, 0, 1, 0, 2, 127, 0));
    wr(w_sig(0, 1, 2, 1, 2, 127, 0));
    wr(w_rs(0, i_str(0,0), rs(OP_RD,  3, 1, s_sig(0))));
    wr(w_rs(0, i_str(1,0), rs(OP_RD,  4, 2, s_sig(1))));
    wr(w_rs(0, i_alu(0,0), rs(OP_ADD, 5, 3, s_str(0), 4, s_str(1))));
    wr(w_rs(0, i_alu(1,0), rs(OP_SUB, 6, 3, s_str(0), 4, s_str(1))));
    wr(w_rs(0, i_alu(0,1), rs(OP_AND, 7, 5, s_alu(0), -1, 0, 63)));
    wr(w_rs(0, i_mul(0,0), rs(OP_MULT,8, 5, s_alu(0), 6, s_alu(1))));
    wr(w_rs(0, i_ldst(0,0), rs(OP_ST, 9, 8, s_mul(0), 7, s_alu(0))));
    wr(w_ctrl(0, 1, 0, 0));
    wait (nst >= 64);
    wr(w_ctrl(0, 0, 0, 0));
    repeat (40) @(posedge clk);
    // expected scratchpad: last k writing each address
    for (int a = 0; a < 64; a++) begin
      int exp_v; bit written;
      written = 0; exp_v = 0;
      // the kernel is continuous: iteration j reads channel words 2(j%64), 2(j%64)+1
      for (int j = 0; j < nst; j++) begin
        int k;
        k = j % 64;
        if (((8*k + 2) & 63) == a) begin written = 1; exp_v = -2 * (8*k + 2); end
      end
      if (written) begin
        host_raddr <= SPM_AW'(a);
        @(posedge clk); @(posedge clk);
        check(host_rdata == DATA_W'(exp_v),
              $sformatf("spm[%0d] = %0d, expected %0d", a, $signed(host_rdata), exp_v));
      end
    end
    check(order_err == 0, "stores out of context order");
    check(t64 - first_st <= 160, $sformatf("64 iterations took %0d cycles", t64 - first_st));
    check(ncomp >= 4*64, "too few compute firings");
    $display("compute IPC over the first 64 iterations: %0.2f",
             real'(ncomp) / real'(t64 - first_st + 1));
    check(!dut.events.drop, "token dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ev.drop) begin
    failures++; $display("FAIL: token dropped at cycle %0d", cyc);
  end
endmodule
