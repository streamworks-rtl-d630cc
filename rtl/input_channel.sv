// input_channel: the input channel of a StreamEngine.
//
// A memory array (2 kB, 512 words) written by producers through the
// communication fabric and read by the stream RS banks, one read port per
// bank. Unlike a FIFO, any word can be read: RD peeks a word, RMV reads it
// and invalidates it (a pop at an arbitrary address). Every word has a valid
// bit, set by a write and cleared by an RMV; when a write and an RMV hit the
// same word in the same cycle the write wins.
// The stream banks may only fire a read whose word is valid: look_addr /
// look_ok give them the valid bit of each RS's operand-A address.
// A read issued in cycle t puts the token {tag, context, word} into the
// port's TDN slot in cycle t+1. Each completed read is reported on
// rd_done/rd_addr for the credit RS bank.
module input_channel
  import sw_pkg::*;
#(
  parameter int unsigned WORDS = CH_WORDS,
  parameter int unsigned NPORT = N_STR,
  parameter int unsigned NLOOK = N_STR * RS_STR
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [CH_AW-1:0]              waddr,
  input  logic [DATA_W-1:0]             wdata,
  input  issue_t [NPORT-1:0]            iss,
  input  logic   [NLOOK-1:0][CH_AW-1:0] look_addr,
  output logic   [NLOOK-1:0]            look_ok,
  output token_t [NPORT-1:0]            tok,
  output logic   [NPORT-1:0]            rd_done,
  output logic   [NPORT-1:0][CH_AW-1:0] rd_addr
);

  logic [DATA_W-1:0] mem [WORDS];
  logic [WORDS-1:0]  vbit;

  for (genvar l = 0; l < NLOOK; l++) begin : g_look
    assign look_ok[l] = (32'(look_addr[l]) < WORDS) && vbit[look_addr[l]];
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_rd
    assign rd_done[p] = iss[p].valid;
    assign rd_addr[p] = iss[p].a[CH_AW-1:0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tok[p] <= '0;
      else        tok[p] <= '{valid: iss[p].valid, tag: iss[p].tag, ctx: iss[p].ctx,
                              data: mem[iss[p].a[CH_AW-1:0]]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vbit <= '0;
    end else begin
      for (int unsigned p = 0; p < NPORT; p++)
        if (iss[p].valid && iss[p].op == OP_RMV) vbit[iss[p].a[CH_AW-1:0]] <= 1'b0;
      if (we) vbit[waddr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  // a read may only be issued on a valid word
  for (genvar p = 0; p < NPORT; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     iss[p].valid |-> vbit[iss[p].a[CH_AW-1:0]])
      else $error("input_channel: read of an invalid word");
  end

endmodule
