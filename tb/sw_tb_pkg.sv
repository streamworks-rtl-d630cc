// sw_tb_pkg: helpers shared by the StreamWorks testbenches. They build the
// configuration words a control-plane processor would write (RS, SIG, push
// and credit entries, control words) and hold the TDN slot numbers used by
// the kernels in the tests.
// The configuration words follow this design's formats (sw_pkg); the
// architecture does not define an encoding.
package sw_tb_pkg;
  import sw_pkg::*;

  function automatic rs_cfg_t rs(opcode_e op, int tag,
                                 int a_tag, int a_slot,
                                 int b_tag = -1, int b_slot = 0, int imm = 0,
                                 int c_tag = -1, int c_slot = 0, int path = 0);
    rs_cfg_t c;
    c         = '0;
    c.valid   = 1'b1;
    c.op      = op;
    c.tag     = TAG_W'(tag);
    c.a_tag   = TAG_W'(a_tag);
    c.a_slot  = SLOT_W'(a_slot);
    c.b_valid = (b_tag >= 0);
    c.b_tag   = TAG_W'((b_tag >= 0) ? b_tag : 0);
    c.b_slot  = SLOT_W'(b_slot);
    c.imm     = DATA_W'(imm);
    c.c_valid = (c_tag >= 0);
    c.c_tag   = TAG_W'((c_tag >= 0) ? c_tag : 0);
    c.c_slot  = SLOT_W'(c_slot);
    c.path    = path[0];
    return c;
  endfunction

  function automatic cfg_t w_rs(int se, int idx, rs_cfg_t c, bit bank = 0);
    cfg_t w;
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = CFG_RS; w.idx = 6'(idx);
    w.bank = bank; w.data = CFG_W'(c);
    return w;
  endfunction

  function automatic cfg_t w_sig(int se, int idx, int tag, int base, int stride,
                                 int length, int offset);
    cfg_t w; sig_cfg_t c;
    c = '{valid: 1'b1, tag: TAG_W'(tag), base: DATA_W'(base), stride: 16'(stride),
          length: DATA_W'(length), offset: 16'(offset)};
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = CFG_SIG; w.idx = 6'(idx);
    w.data = CFG_W'(c);
    return w;
  endfunction

  function automatic cfg_t w_push(int se, int idx, int tag, int slot, int lo, int hi,
                                  int cons, int start, int stop, int stride, int index,
                                  int credit);
    cfg_t w; push_cfg_t c;
    c = '{valid: 1'b1, tag: TAG_W'(tag), slot: SLOT_W'(slot), iter_lo: CTX_W'(lo),
          iter_hi: CTX_W'(hi), cons_se: SE_ID_W'(cons), ch_start: CH_AW'(start),
          ch_end: CH_AW'(stop), stride: CH_AW'(stride), index: CH_AW'(index),
          credit: 8'(credit)};
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = CFG_PUSH; w.idx = 6'(idx);
    w.data = CFG_W'(c);
    return w;
  endfunction

  function automatic cfg_t w_credit(int se, int idx, int start, int stop, int max_cnt,
                                    int prod, int tag);
    cfg_t w; credit_cfg_t c;
    c = '{valid: 1'b1, start: CH_AW'(start), stop: CH_AW'(stop), max_cnt: CNT_W'(max_cnt),
          prod_se: SE_ID_W'(prod), tag: TAG_W'(tag)};
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = CFG_CREDIT; w.idx = 6'(idx);
    w.data = CFG_W'(c);
    return w;
  endfunction

  function automatic cfg_t w_mem(int se, cfg_kind_e kind, int addr, int value);
    cfg_t w;
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = kind;
    w.data = CFG_W'({32'(addr), 32'(value)});
    return w;
  endfunction

  function automatic cfg_t w_ctrl(int se, bit run, bit active, bit clr);
    cfg_t w;
    w = '0; w.valid = 1; w.se = SE_ID_W'(se); w.kind = CFG_CTRL;
    w.data = CFG_W'({clr, active, run});
    return w;
  endfunction

  // slot numbers
  function automatic int s_sig(int i); return SLOT_SIG + i; endfunction
  function automatic int s_str(int i); return SLOT_STR + i; endfunction
  function automatic int s_alu(int i); return SLOT_ALU + i; endfunction
  function automatic int s_mul(int i); return SLOT_MUL + i; endfunction
  function automatic int s_ld (int i); return SLOT_LD  + i; endfunction

  // RS index of RS r in a bank
  function automatic int i_str (int b, int r); return BASE_STR  + b*RS_STR  + r; endfunction
  function automatic int i_alu (int b, int r); return BASE_ALU  + b*RS_ALU  + r; endfunction
  function automatic int i_mul (int b, int r); return BASE_MUL  + b*RS_MUL  + r; endfunction
  function automatic int i_ldst(int b, int r); return BASE_LDST + b*RS_LDST + r; endfunction
endpackage
