// sw_pkg: types and constants shared by every StreamWorks module.
//
// The StreamEngine (SE) configuration follows the synthesized configuration
// of the design: 32-bit datapath, 2 input-channel read ports, 2 kB channel,
// 2 kB scratchpad, 4 stream index generators, 3 ALUs and 2 multipliers with a
// 4-stage pipeline, 2 stream RS banks of 4, 3 ALU banks of 8, 2 multiplier
// banks of 4, 2 LD/ST banks of 4 (48 reservation stations) and 5 operand
// buffers per operand. Tag, context, push-table and credit-table sizes are
// not fixed by the architecture description; the values below are this
// implementation's choices.
//
// Tokens travel on the token distribution network (TDN) as
// {valid, tag, context, data}. The TDN has one slot per token source:
// SIG0-3, stream port 0-1, ALU0-2, MUL0-1, load port 0-1.
package sw_pkg;

  // ---------------- datapath ----------------
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned TAG_W    = 6;   // 48 RS + 4 SIG need at least 6 bits
  localparam int unsigned CTX_W    = 8;   // context (iteration) id, compared modulo 2^CTX_W
  localparam int unsigned FU_DEPTH = 4;   // ALU / MUL pipeline depth

  // ---------------- StreamEngine composition ----------------
  localparam int unsigned N_SIG   = 4;
  localparam int unsigned N_STR   = 2;    // stream RSBs = channel read ports
  localparam int unsigned N_ALU   = 3;
  localparam int unsigned N_MUL   = 2;
  localparam int unsigned N_LDST  = 2;
  localparam int unsigned RS_STR  = 4;
  localparam int unsigned RS_ALU  = 8;
  localparam int unsigned RS_MUL  = 4;
  localparam int unsigned RS_LDST = 4;
  localparam int unsigned NBUF    = 5;    // operand buffers per operand

  localparam int unsigned BASE_STR  = 0;
  localparam int unsigned BASE_ALU  = BASE_STR + N_STR * RS_STR;    // 8
  localparam int unsigned BASE_MUL  = BASE_ALU + N_ALU * RS_ALU;    // 32
  localparam int unsigned BASE_LDST = BASE_MUL + N_MUL * RS_MUL;    // 40
  localparam int unsigned N_RS      = BASE_LDST + N_LDST * RS_LDST; // 48

  // TDN slot map
  localparam int unsigned SLOT_SIG  = 0;
  localparam int unsigned SLOT_STR  = SLOT_SIG + N_SIG;   // 4
  localparam int unsigned SLOT_ALU  = SLOT_STR + N_STR;   // 6
  localparam int unsigned SLOT_MUL  = SLOT_ALU + N_ALU;   // 9
  localparam int unsigned SLOT_LD   = SLOT_MUL + N_MUL;   // 11
  localparam int unsigned N_SLOT    = SLOT_LD + N_LDST;   // 13
  localparam int unsigned SLOT_W    = 4;

  // ---------------- memories ----------------
  localparam int unsigned CH_WORDS  = 512;  // 2 kB input channel
  localparam int unsigned CH_AW     = 9;
  localparam int unsigned SPM_WORDS = 512;  // 2 kB scratchpad
  localparam int unsigned SPM_AW    = 9;

  // ---------------- communication unit ----------------
  localparam int unsigned N_PUSH   = 8;     // push RS entries
  localparam int unsigned PUSH_Q   = 8;     // token queue per push RS
  localparam int unsigned N_CREDIT = 4;     // channel credit RS entries
  localparam int unsigned SE_ID_W  = 8;     // {cluster[4:0], se[2:0]}
  localparam int unsigned SE_PER_CLUSTER = 8;
  localparam int unsigned CNT_W    = 10;

  // ---------------- opcodes ----------------
  typedef enum logic [4:0] {
    OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SLT,
    OP_MOVE,
    OP_BEQ, OP_BNE, OP_BGE, OP_BLT, OP_BEQZ, OP_BNEZ, OP_BLTZ, OP_BGEZ,
    OP_BR_SKIP,
    OP_MULT, OP_MADD,
    OP_RD, OP_RMV,
    OP_LD, OP_ST
  } opcode_e;

  function automatic logic is_branch(opcode_e op);
    return op inside {OP_BEQ, OP_BNE, OP_BGE, OP_BLT, OP_BEQZ, OP_BNEZ,
                      OP_BLTZ, OP_BGEZ, OP_BR_SKIP};
  endfunction

  // a is "later" than b (modular context comparison)
  function automatic logic ctx_gt(logic [CTX_W-1:0] a, logic [CTX_W-1:0] b);
    logic [CTX_W-1:0] d;
    d = a - b;
    return (d != '0) && !d[CTX_W-1];
  endfunction

  // ---------------- bundles ----------------
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [CTX_W-1:0]  ctx;
    logic [DATA_W-1:0] data;
  } token_t;

  // configuration fields of one reservation station (Fig. 2.4 / 2.6)
  typedef struct packed {
    logic              valid;
    opcode_e           op;
    logic [TAG_W-1:0]  tag;
    logic [TAG_W-1:0]  a_tag;
    logic [SLOT_W-1:0] a_slot;
    logic              b_valid;   // 0: operand B is the immediate
    logic [TAG_W-1:0]  b_tag;
    logic [SLOT_W-1:0] b_slot;
    logic [DATA_W-1:0] imm;
    logic              c_valid;   // instruction is predicated
    logic [TAG_W-1:0]  c_tag;
    logic [SLOT_W-1:0] c_slot;
    logic              path;      // branch path the instruction belongs to
  } rs_cfg_t;

  // operation sent from an RS bank to its functional unit or port
  typedef struct packed {
    logic              valid;
    opcode_e           op;
    logic [TAG_W-1:0]  tag;
    logic [CTX_W-1:0]  ctx;
    logic [DATA_W-1:0] a;
    logic [DATA_W-1:0] b;
  } issue_t;

  // stall request from a consumer operand (or push RS) to the DFM
  typedef struct packed {
    logic              valid;
    logic              any;       // stall regardless of context (push unit)
    logic [TAG_W-1:0]  tag;
    logic [CTX_W-1:0]  ctx;
  } sreq_t;

  // ISIG dst, base, stride, length, offset
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] base;
    logic [15:0]       stride;
    logic [DATA_W-1:0] length;
    logic [15:0]       offset;
  } sig_cfg_t;

  // push RS (Table of push-unit fields)
  typedef struct packed {
    logic               valid;
    logic [TAG_W-1:0]   tag;
    logic [SLOT_W-1:0]  slot;
    logic [CTX_W-1:0]   iter_lo;
    logic [CTX_W-1:0]   iter_hi;
    logic [SE_ID_W-1:0] cons_se;
    logic [CH_AW-1:0]   ch_start;
    logic [CH_AW-1:0]   ch_end;
    logic [CH_AW-1:0]   stride;
    logic [CH_AW-1:0]   index;
    logic [7:0]         credit;
  } push_cfg_t;

  // channel credit RS
  typedef struct packed {
    logic               valid;
    logic [CH_AW-1:0]   start;
    logic [CH_AW-1:0]   stop;
    logic [CNT_W-1:0]   max_cnt;
    logic [SE_ID_W-1:0] prod_se;
    logic [TAG_W-1:0]   tag;
  } credit_cfg_t;

  // packets on the communication fabric
  typedef enum logic {PKT_DATA = 1'b0, PKT_CREDIT = 1'b1} pkt_kind_e;
  typedef struct packed {
    pkt_kind_e          kind;
    logic [SE_ID_W-1:0] dst;
    logic [SE_ID_W-1:0] src;
    logic [CH_AW-1:0]   addr;   // DATA: channel address; CREDIT: start of credited range
    logic [DATA_W-1:0]  data;   // DATA: value; CREDIT: tag of the push instruction
  } pkt_t;

  // configuration writes from the control-plane processor
  typedef enum logic [2:0] {
    CFG_RS, CFG_SIG, CFG_PUSH, CFG_CREDIT, CFG_SPM, CFG_CHAN, CFG_CTRL
  } cfg_kind_e;
  localparam int unsigned CFG_W = 128;
  typedef struct packed {
    logic               valid;
    logic [SE_ID_W-1:0] se;
    cfg_kind_e          kind;
    logic [5:0]         idx;
    logic               bank;   // RS configuration bank (0 = RS, 1 = shadow RS)
    logic [CFG_W-1:0]   data;
  } cfg_t;
  // CFG_CTRL data: [0] run, [1] active bank, [2] clear dynamic state
  // CFG_SPM / CFG_CHAN data: [CH_AW+31:32] address, [31:0] value

  // per-cycle activity of one StreamEngine (for monitoring and tests)
  typedef struct packed {
    logic fire;          // an RS dispatched an operation
    logic idle;          // an RS on a not-taken path advanced without dispatch
    logic skip;          // a branch on a not-taken path dispatched BR_SKIP
    logic contention;    // a ready RS lost arbitration for its unit
    logic rs_stall;      // the DFM stalled an RS
    logic sig_stall;     // the DFM stalled a SIG
    logic push;          // the push unit sent a data packet
    logic push_wrap;     // a push index wrapped (one credit spent)
    logic credit_stall;  // a push RS had no credit
    logic credit_out;    // the channel sent a credit back
    logic credit_in;     // a credit arrived for the push unit
    logic drop;          // a token was lost (must never happen)
  } se_events_t;

endpackage
