// spm: scratchpad memory of a StreamEngine (2 kB, 512 x 32-bit words).
//
// One port per LD/ST RS bank. A load (LD, address in operand A) issued in
// cycle t puts the token {tag, context, word} into the port's TDN slot in
// cycle t+1. A store (ST) writes operand A to the address in operand B and
// produces no token. The control-plane processor writes words through
// host_we (sharing port 0, which it takes priority on; port_busy tells the
// first LD/ST bank not to fire) and reads them through a separate read port
// with one cycle of latency. Address bits above the array size are ignored.
module spm
  import sw_pkg::*;
#(
  parameter int unsigned WORDS = SPM_WORDS,
  parameter int unsigned NPORT = N_LDST
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  issue_t [NPORT-1:0]      iss,
  output token_t [NPORT-1:0]      tok,
  input  logic                    host_we,
  input  logic [SPM_AW-1:0]       host_waddr,
  input  logic [DATA_W-1:0]       host_wdata,
  output logic                    port_busy,
  input  logic [SPM_AW-1:0]       host_raddr,
  output logic [DATA_W-1:0]       host_rdata,
  output logic [NPORT-1:0]        stored
);

  logic [DATA_W-1:0] mem [WORDS];

  assign port_busy = host_we;

  for (genvar p = 0; p < NPORT; p++) begin : g_p
    assign stored[p] = iss[p].valid && iss[p].op == OP_ST;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tok[p] <= '0;
      else        tok[p] <= '{valid: iss[p].valid && iss[p].op == OP_LD, tag: iss[p].tag,
                              ctx: iss[p].ctx, data: mem[iss[p].a[SPM_AW-1:0]]};
    end
  end

  always_ff @(posedge clk) begin
    if (host_we) mem[host_waddr] <= host_wdata;
    for (int unsigned p = 0; p < NPORT; p++)
      if (iss[p].valid && iss[p].op == OP_ST && !(p == 0 && host_we))
        mem[iss[p].b[SPM_AW-1:0]] <= iss[p].a;
    host_rdata <= mem[host_raddr];
  end

endmodule
