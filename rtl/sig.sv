// sig: Stream Index Generator.
//
// Executes the ISIG instruction (base, stride, length, offset): starting at
// base it emits one index per cycle as a token {SIG tag, context, index},
// adding stride each time while the index does not exceed length. When the
// next index would pass length, offset is added to both base and length and
// generation restarts from the new base. Each index carries a new context,
// so the loop trip count never becomes a dependence between iterations
// (iteration decoupling). The generator runs while `run` is high and pauses
// while the dataflow monitor stalls it. Loading a configuration or `clear`
// restarts it at context 0. Comparisons are unsigned.
module sig
  import sw_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             run,
  input  logic             cfg_we,
  input  sig_cfg_t         cfg_in,
  input  logic             stall,
  output sig_cfg_t         cfg,
  output logic [CTX_W-1:0] ctx,
  output token_t           tok
);

  logic [DATA_W-1:0] idx, cur_base, cur_len;
  logic [DATA_W:0]   nxt;
  logic              fire;

  assign fire = run && cfg.valid && !stall;
  assign nxt  = {1'b0, idx} + {17'd0, cfg.stride};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '0;
      idx      <= '0;
      cur_base <= '0;
      cur_len  <= '0;
      ctx      <= '0;
      tok      <= '0;
    end else if (cfg_we) begin
      cfg      <= cfg_in;
      idx      <= cfg_in.base;
      cur_base <= cfg_in.base;
      cur_len  <= cfg_in.length;
      ctx      <= '0;
      tok      <= '0;
    end else if (clear) begin
      idx      <= cfg.base;
      cur_base <= cfg.base;
      cur_len  <= cfg.length;
      ctx      <= '0;
      tok      <= '0;
    end else begin
      tok <= '{valid: fire, tag: cfg.tag, ctx: ctx, data: idx};
      if (fire) begin
        ctx <= ctx + 1'b1;
        if (nxt > {1'b0, cur_len}) begin
          cur_base <= cur_base + {16'd0, cfg.offset};
          cur_len  <= cur_len + {16'd0, cfg.offset};
          idx      <= cur_base + {16'd0, cfg.offset};
        end else begin
          idx <= nxt[DATA_W-1:0];
        end
      end
    end
  end

endmodule
