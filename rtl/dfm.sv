// dfm: Dataflow Monitor of a StreamEngine.
//
// Collects the stall requests of all consumer operands (and push RSs) and
// turns them into per-producer stalls. A request names a producer tag and
// carries the requester's context. Following the monitor's rule, only the
// producers with that tag whose context is later than the requester's are
// stalled, so a join instruction fed by several same-tag producers on
// different branch paths still receives the token it is waiting for.
// Requests with `any` set (from the push unit, which has no context) stall
// every producer with the tag. Combinational.
// The first 3*NGRP requests come in groups of three (the three operands of
// one RS) that always carry the same context, so the context comparison is
// done once per group: NPROD*NGRP comparators instead of NPROD*3*NGRP. The
// remaining requests (push RSs) are compared one by one.
module dfm
  import sw_pkg::*;
#(
  parameter int unsigned NPROD = N_RS + N_SIG,
  parameter int unsigned NREQ  = 3 * N_RS + N_PUSH,
  parameter int unsigned NGRP  = N_RS
) (
  input  logic  [NPROD-1:0]            prod_valid,
  input  logic  [NPROD-1:0][TAG_W-1:0] prod_tag,
  input  logic  [NPROD-1:0][CTX_W-1:0] prod_ctx,
  input  sreq_t [NREQ-1:0]             req,
  output logic  [NPROD-1:0]            stall
);

  for (genvar p = 0; p < NPROD; p++) begin : g_p
    logic [NREQ-1:0] later;   // producer context later than request context
    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      logic gt;
      assign gt = ctx_gt(prod_ctx[p], req[3*g].ctx);
      assign later[3*g +: 3] = {3{gt}};
    end
    for (genvar r = 3 * NGRP; r < NREQ; r++) begin : g_one
      assign later[r] = ctx_gt(prod_ctx[p], req[r].ctx);
    end
    always_comb begin
      stall[p] = 1'b0;
      for (int unsigned r = 0; r < NREQ; r++)
        if (prod_valid[p] && req[r].valid && req[r].tag == prod_tag[p] &&
            (req[r].any || later[r]))
          stall[p] = 1'b1;
    end
  end

endmodule
