// dvi_pkg: types and constants shared by the dead-value-information (DVI)
// rename-stage hardware.
//
// An operation reaches the DVI hardware already classified by the core's
// instruction decoder. Besides ordinary instructions there are procedure
// calls and returns (which carry implicit DVI for the caller-saved registers),
// explicit kill instructions (E-DVI, a kill mask over a subset of the
// registers), live-stores and live-loads (the save and restore variants that
// execute only when their data register holds a live value), and the pair of
// instructions that store and load the Live Value Mask for thread switches.
//
// Encoding of the E-DVI kill field is this design's own choice: 16 mask bits
// plus one bit that selects which half of the 32 registers they cover
// (0: r0..r15, 1: r16..r31). The callee-saved registers of a MIPS-style ABI
// (r16..r23, r30) all fall in the upper half, so one kill instruction before
// a call covers them all.
package dvi_pkg;

  parameter int unsigned NUM_ARCH    = 32;  // architectural integer registers
  parameter int unsigned AREG_W      = 5;
  parameter int unsigned KILL_MASK_W = 16;  // width of the E-DVI mask field

  typedef logic [NUM_ARCH-1:0] regmask_t;
  typedef logic [AREG_W-1:0]   areg_t;

  typedef enum logic [2:0] {
    OP_NORMAL     = 3'd0,  // any other instruction
    OP_CALL       = 3'd1,  // procedure call: I-DVI, push LVM snapshot
    OP_RETURN     = 3'd2,  // procedure return: I-DVI, pop LVM snapshot
    OP_KILL       = 3'd3,  // E-DVI instruction carrying a kill mask
    OP_LIVE_STORE = 3'd4,  // save: data register in src1, address base in src2
    OP_LIVE_LOAD  = 3'd5,  // restore: data register in dst, address base in src1
    OP_LVM_SAVE   = 3'd6,  // store the LVM to the thread control block
    OP_LVM_LOAD   = 3'd7   // load the LVM (value supplied in lvm_data)
  } op_kind_e;

  typedef struct packed {
    op_kind_e                 kind;
    logic                     has_dst;
    areg_t                    dst;
    logic                     has_src1;
    areg_t                    src1;
    logic                     has_src2;
    areg_t                    src2;
    logic                     kill_hi;    // E-DVI: mask covers r16..r31
    logic [KILL_MASK_W-1:0]   kill_mask;  // E-DVI: bit set = register dead
    regmask_t                 lvm_data;   // OP_LVM_LOAD: value loaded
  } dvi_op_t;

  // Expand an E-DVI kill field to a full register mask.
  function automatic regmask_t edvi_expand(logic hi, logic [KILL_MASK_W-1:0] m);
    regmask_t r;
    r = '0;
    if (hi) r[NUM_ARCH-1:KILL_MASK_W] = m;
    else    r[KILL_MASK_W-1:0]        = m;
    return r;
  endfunction

endpackage
