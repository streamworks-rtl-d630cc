// tb_tdn: self-checking test of the tag distribution network.
// Uses the full-size network (13 token slots, 152 destination operands).
// Every destination selects a slot; each slot carries a distinct token. The
// test checks that every destination sees exactly the token of its slot,
// for every slot number, in the same cycle (the network is combinational).
// The one-slot-per-source broadcast follows the architecture; the slot
// count and order are this design's. The test is purely combinational.
`timescale 1ns/1ps
module tb_tdn;
  import sw_pkg::*;
  localparam int NS = N_SLOT, ND = 3 * N_RS + N_PUSH;
  token_t [NS-1:0]             slot;
  logic   [ND-1:0][SLOT_W-1:0] sel;
  token_t [ND-1:0]             tok;
  int checks = 0, failures = 0;
  tdn dut (.slot, .sel, .tok);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin #100000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int s = 0; s < NS; s++)
      slot[s] = '{valid: 1'b1, tag: TAG_W'(s + 1), ctx: CTX_W'(3 * s), data: DATA_W'(1000 + s)};
    for (int round = 0; round < NS; round++) begin
      for (int d = 0; d < ND; d++) sel[d] = SLOT_W'((d + round) % NS);
      #1;
      for (int d = 0; d < ND; d++)
        check(tok[d] == slot[(d + round) % NS], $sformatf("destination %0d slot %0d", d, (d + round) % NS));
    end
    // an idle slot delivers no token
    slot[4].valid = 1'b0;
    for (int d = 0; d < ND; d++) sel[d] = SLOT_W'(4);
    #1 check(tok == '0 || !tok[0].valid, "idle slot gives no valid token");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
