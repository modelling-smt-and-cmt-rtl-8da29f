// spm_pkg: types, widths and field helpers shared by the AC-P2 dual-core
// processor.
//
// The SPM instruction set has five instructions (add, branch, load, store,
// set) over a word of WORD_W bits, memory addresses of ADDR_W bits and
// register indices of RIDX_W bits. The opcode is 3 bits wide and the
// pipeline counter 2 bits wide, as the architecture defines them; the three
// widths WORD_W, ADDR_W and RIDX_W are free parameters of the architecture
// and the values below are this design's choice.
//
// Instruction format (this design's choice; the architecture only fixes the
// fields and lets the address/immediate overlap rb and rc):
//   [15:13] opcode   [12:10] ra   [9:8] unused   [7:0] address / immediate
//   rb = [5:3], rc = [2:0] (inside the address field)
package spm_pkg;

  parameter int unsigned WORD_W = 16;
  parameter int unsigned ADDR_W = 8;
  parameter int unsigned RIDX_W = 3;
  parameter int unsigned OP_W   = 3;
  parameter int unsigned CTR_W  = 2;
  parameter int unsigned NREGS  = 1 << RIDX_W;
  parameter int unsigned MEM_DEPTH = 1 << ADDR_W;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] mar_t;
  typedef logic [RIDX_W-1:0] ri_t;
  typedef logic [CTR_W-1:0]  ctr_t;

  typedef enum logic [OP_W-1:0] {
    OP_ADD    = 3'd0,
    OP_BRANCH = 3'd1,
    OP_LOAD   = 3'd2,
    OP_STORE  = 3'd3,
    OP_SET    = 3'd4
  } opcode_t;

  // Action / destination of the instruction held in the execute unit.
  typedef enum logic [2:0] {
    U_REG   = 3'd0,
    U_PC    = 3'd1,
    U_INCPC = 3'd2,
    U_DMEM  = 3'd3,
    U_WAIT  = 3'd4
  } unit_t;

  // Pipeline state classes used by the duration function.
  typedef enum logic [1:0] {
    PS_FULL           = 2'd0,
    PS_AFTER_CONFLICT = 2'd1,
    PS_AFTER_BRANCH   = 2'd2,
    PS_FLUSHED        = 2'd3
  } pipe_state_t;

  // Fetch unit state: instruction register and fetch program counter.
  typedef struct packed {
    word_t ir;
    mar_t  fpc;
  } ftch_t;

  // Decode unit state: the fields of the instruction.
  typedef struct packed {
    opcode_t opr;
    ri_t     ra;
    ri_t     rb;
    ri_t     rc;
    mar_t    address;
  } dec_t;

  // Execute unit state: result, destination, action and pipeline counter.
  typedef struct packed {
    word_t result;
    mar_t  dest;
    unit_t unit;
    ctr_t  ctr;
  } ex_t;

  localparam int unsigned RA_LSB = WORD_W - OP_W - RIDX_W;

  function automatic opcode_t op_of(word_t ir);
    return opcode_t'(ir[WORD_W-1 -: OP_W]);
  endfunction

  function automatic ri_t ra_of(word_t ir);
    return ir[RA_LSB +: RIDX_W];
  endfunction

  function automatic ri_t rb_of(word_t ir);
    return ir[RIDX_W +: RIDX_W];
  endfunction

  function automatic ri_t rc_of(word_t ir);
    return ir[0 +: RIDX_W];
  endfunction

  function automatic mar_t addr_of(word_t ir);
    return ir[0 +: ADDR_W];
  endfunction

  // pad: widen with leading zeros; trim: drop them again.
  function automatic mar_t pad_ri(ri_t r);
    return mar_t'(r);
  endfunction

  function automatic word_t pad_mar(mar_t a);
    return word_t'(a);
  endfunction

  function automatic ri_t trim(mar_t a);
    return a[RIDX_W-1:0];
  endfunction

  // Instruction encoders, used to build programs.
  function automatic word_t enc(opcode_t op, ri_t ra, mar_t addr);
    word_t w;
    w = '0;
    w[WORD_W-1 -: OP_W] = op;
    w[RA_LSB +: RIDX_W] = ra;
    w[0 +: ADDR_W]      = addr;
    return w;
  endfunction

  function automatic word_t enc_add(ri_t ra, ri_t rb, ri_t rc);
    mar_t a;
    a = '0;
    a[RIDX_W +: RIDX_W] = rb;
    a[0 +: RIDX_W]      = rc;
    return enc(OP_ADD, ra, a);
  endfunction

endpackage
