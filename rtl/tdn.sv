// tdn: token distribution network of a StreamEngine.
//
// The TDN is a broadcast bus with one slot per token source (SIGs, stream
// ports, ALUs, multipliers, load ports); each source drives at most one token
// per cycle into its own slot. Because instructions are locked into their
// reservation stations, the producer of every operand is known when the
// kernel is configured, so each consumer operand only needs a static switch
// that selects one slot; there is no associative search over the whole bus.
// This module is that set of switches: NDST destination operands, each with
// its own slot select. Purely combinational; tokens are registered by the
// sources.
module tdn
  import sw_pkg::*;
#(
  parameter int unsigned NSRC = N_SLOT,
  parameter int unsigned NDST = 3 * N_RS + N_PUSH
) (
  input  token_t [NSRC-1:0]             slot,
  input  logic   [NDST-1:0][SLOT_W-1:0] sel,
  output token_t [NDST-1:0]             tok
);

  // slots padded to 2**SLOT_W entries; unused selects read an empty token
  token_t [(1 << SLOT_W)-1:0] padded;

  always_comb begin
    padded = '0;
    for (int unsigned s = 0; s < NSRC; s++) padded[s] = slot[s];
  end

  for (genvar d = 0; d < NDST; d++) begin : g_dst
    assign tok[d] = padded[sel[d]];
  end

endmodule
