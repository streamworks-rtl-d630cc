// tb_sig: self-checking test of the stream index generator.
// Configures an ISIG-style pattern (base 0, stride 2, length 6, offset 10)
// and compares every emitted index and context against a reference model
// of the pattern (0 2 4 6 10 12 14 16 20 ...). Checks the rate of one index
// per cycle while running, no index during a stall cycle, and the restart at
// context 0 after a clear.
// The base/stride/length stream follows the architecture's ISIG
// instruction, including the offset step. The
// stimulus is driven on falling edges and checked before rising edges.
`timescale 1ns/1ps
module tb_sig;
  import sw_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, run = 0, cfg_we = 0, stall = 0;
  always #5 clk = ~clk;
  sig_cfg_t cfg_in = '0, cfg;
  logic [CTX_W-1:0] ctx;
  token_t tok;
  int checks = 0, failures = 0;
  sig dut (.clk, .rst_n, .clear, .run, .cfg_we, .cfg_in, .stall, .cfg, .ctx, .tok);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int m_idx, m_base, m_len, m_ctx, n_tok, stall_cycles;
  task automatic model_reset(); m_idx = 0; m_base = 0; m_len = 6; m_ctx = 0; endtask
  function automatic int model_next();
    int r;
    r = m_idx;
    if (m_idx + 2 > m_len) begin m_base += 10; m_len += 10; m_idx = m_base; end
    else m_idx += 2;
    return r;
  endfunction

  // every cycle: a token must follow each non-stalled running cycle
  logic fired_q = 0;
  always @(negedge clk) if (rst_n) begin
    check(tok.valid == fired_q, "token exactly one cycle after each firing cycle");
    if (tok.valid) begin
      int e;
      e = model_next();
      check(tok.data == DATA_W'(e) && tok.ctx == CTX_W'(m_ctx) && tok.tag == 6'd5,
            $sformatf("index %0d ctx %0d, expected %0d ctx %0d", tok.data, tok.ctx, e, m_ctx));
      m_ctx++; n_tok++;
    end
  end
  always @(posedge clk) fired_q <= run && !stall && !cfg_we && !clear && cfg.valid;

  initial begin #200000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    model_reset();
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    cfg_in = '{valid: 1'b1, tag: 6'd5, base: 32'd0, stride: 16'd2, length: 32'd6, offset: 16'd10};
    cfg_we = 1; @(negedge clk); cfg_we = 0;
    run = 1;
    repeat (12) @(negedge clk);
    stall = 1; repeat (3) @(negedge clk); stall = 0;
    repeat (10) @(negedge clk);
    check(n_tok >= 20, $sformatf("rate: %0d indices in 22 run cycles", n_tok));
    run = 0; @(negedge clk); @(negedge clk);
    clear = 1; @(negedge clk); clear = 0;
    model_reset();
    run = 1; repeat (6) @(negedge clk); run = 0;
    repeat (3) @(negedge clk);
    check(n_tok >= 26, "indices after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
