// rename_slot: the rename and drop logic for one operation of a decode
// group. dvi_rename chains W of these: each slot receives the rename state
// (map, binding bits, Live Value Mask) as left by the older operations of the
// same group, applies its own operation, and passes the result on. The chain
// is purely combinational; dvi_rename registers the state after the last
// slot.
//
// One slot does, in order: decide whether a live-store or live-load is
// dropped (sr_elim, judged by the LVM as it stands before this operation and
// by the LVM-Stack top); unbind every register in its kill vector, listing
// their physical registers for release at commit; take the next free
// physical register for its destination, listing the replaced one for
// release; and update the LVM (LVM-load, kills, callee-saved bits restored
// from the stack top at a return, destination set live).
//
// A slot is accepted only if all older slots were, a physical register is
// available when it needs one and the reorder buffer has room when it is not
// dropped. A call or a return ends the group (cont_o low for the next slot),
// so that the LVM-Stack moves at most once per cycle and is read unchanged by
// every slot.
//
// From the scheme: the drop rules, unbinding at a kill with release at
// commit, and the LVM updates. Own choices: the slot chain itself (the scheme
// does not say how several operations per cycle are handled), ending a group
// at a call or return, and the order of the LVM updates within one operation.
module rename_slot
  import dvi_pkg::*;
#(
  parameter int unsigned PHYS         = 50,
  parameter int unsigned W            = 4,
  parameter int unsigned ROB_DEPTH    = 64,
  parameter bit          RESTORE_ELIM = 1'b1
) (
  input  logic                                     en,          // older slots accepted, group not ended
  input  logic                                     in_valid,
  input  dvi_op_t                                  op,
  input  regmask_t                                 kill_vec,    // from dvi_decode
  input  logic                                     is_stack_op, // call or return
  input  logic                                     pop,         // return
  input  regmask_t                                 stack_top,
  input  regmask_t                                 callee_mask,
  // state from the older slots
  input  regmask_t                                 lvm_i,
  input  regmask_t                                 valid_i,
  input  logic [NUM_ARCH-1:0][$clog2(PHYS)-1:0]    map_i,
  input  logic [$clog2(W+1)-1:0]                   nalloc_i,
  input  logic [$clog2(ROB_DEPTH+1)-1:0]           nrob_i,
  // shared resources
  input  logic [$clog2(PHYS)-1:0]                  alloc_tag [W],
  input  logic                                     alloc_ok  [W],
  input  logic [$clog2(ROB_DEPTH+1)-1:0]           rob_free,
  // results for this operation
  output logic                                     accept,
  output logic                                     dispatch,
  output logic                                     elim_save,
  output logic                                     elim_restore,
  output logic                                     need_alloc,
  output logic [$clog2(PHYS)-1:0]                  src1_p,
  output logic [$clog2(PHYS)-1:0]                  src2_p,
  output logic                                     src1_bound,
  output logic                                     src2_bound,
  output logic [$clog2(PHYS)-1:0]                  dst_p,
  output logic [PHYS-1:0]                          free_mask,
  // state for the younger slots
  output logic                                     cont_o,
  output regmask_t                                 lvm_o,
  output regmask_t                                 valid_o,
  output logic [NUM_ARCH-1:0][$clog2(PHYS)-1:0]    map_o,
  output logic [$clog2(W+1)-1:0]                   nalloc_o,
  output logic [$clog2(ROB_DEPTH+1)-1:0]           nrob_o
);

  logic     es, er, eliminate, have_reg;
  regmask_t valid_k, lvm_n;

  sr_elim #(.RESTORE_ELIM(RESTORE_ELIM)) u_elim (
    .op, .lvm (lvm_i), .stack_top,
    .elim_save (es), .elim_restore (er), .eliminate
  );

  localparam int unsigned TW = $clog2(PHYS);

  // Table lookups are written as compare-and-select loops rather than
  // variable indexing, so that synthesis builds plain selectors.
  function automatic logic [TW-1:0] tag_of(logic [NUM_ARCH-1:0][TW-1:0] m, areg_t r);
    logic [TW-1:0] t;
    t = '0;
    for (int i = 0; i < NUM_ARCH; i++) if (r == areg_t'(i)) t = m[i];
    return t;
  endfunction

  function automatic logic bit_of(regmask_t v, areg_t r);
    logic b;
    b = 1'b0;
    for (int i = 0; i < NUM_ARCH; i++) if (r == areg_t'(i)) b = v[i];
    return b;
  endfunction

  function automatic logic [PHYS-1:0] onehot(logic [TW-1:0] t);
    logic [PHYS-1:0] o;
    for (int p = 0; p < PHYS; p++) o[p] = (t == TW'(p));
    return o;
  endfunction

  always_comb begin
    need_alloc = op.has_dst && !eliminate;
    have_reg   = 1'b0;
    dst_p      = alloc_tag[0];
    for (int k = 0; k < W; k++)
      if (nalloc_i == $bits(nalloc_i)'(k)) begin
        have_reg = alloc_ok[k];
        dst_p    = alloc_tag[k];
      end
    accept     = en && in_valid
              && (!need_alloc || have_reg)
              && (eliminate || (nrob_i < rob_free));
    dispatch     = accept && !eliminate;
    elim_save    = accept && es;
    elim_restore = accept && er;
    src1_p     = tag_of(map_i, op.src1);
    src2_p     = tag_of(map_i, op.src2);
    src1_bound = bit_of(valid_i, op.src1);
    src2_bound = bit_of(valid_i, op.src2);

    // registers released by this operation
    free_mask = '0;
    valid_k   = valid_i;
    for (int i = 0; i < NUM_ARCH; i++)
      if (kill_vec[i] && valid_i[i]) begin
        free_mask  = free_mask | onehot(map_i[i]);
        valid_k[i] = 1'b0;
      end
    if (need_alloc) begin
      for (int i = 0; i < NUM_ARCH; i++)
        if (op.dst == areg_t'(i)) begin
          if (valid_k[i]) free_mask = free_mask | onehot(map_i[i]);
          valid_k[i] = 1'b1;
        end
    end

    // Live Value Mask after this operation
    lvm_n = (op.kind == OP_LVM_LOAD) ? op.lvm_data : lvm_i;
    lvm_n = lvm_n & ~kill_vec;
    if (pop) lvm_n = (lvm_n & ~callee_mask) | (stack_top & callee_mask);
    for (int i = 0; i < NUM_ARCH; i++)
      if (need_alloc && op.dst == areg_t'(i)) lvm_n[i] = 1'b1;

    // state passed on
    cont_o   = accept && !is_stack_op;
    lvm_o    = dispatch ? lvm_n   : lvm_i;
    valid_o  = dispatch ? valid_k : valid_i;
    map_o    = map_i;
    for (int i = 0; i < NUM_ARCH; i++)
      if (dispatch && need_alloc && op.dst == areg_t'(i)) map_o[i] = dst_p;
    nalloc_o = nalloc_i + $bits(nalloc_i)'(dispatch && need_alloc);
    nrob_o   = nrob_i + $bits(nrob_i)'(dispatch);
  end

endmodule
