// sr_elim: dead save/restore elimination decision at decode.
//
// A live-store (callee save) is dropped, not dispatched, when its data
// register is marked dead in the Live Value Mask (LVM). A live-load (callee
// restore) is dropped when the same register is dead in the LVM snapshot at
// the top of the LVM-Stack: that snapshot was taken at procedure entry, so it
// is the very information that decided the matching save. An empty LVM-Stack
// reads as all-live, so nothing is dropped then.
//
// RESTORE_ELIM = 1 gives the LVM-Stack scheme (saves and restores); 0 gives
// the LVM scheme (saves only). Purely combinational.
module sr_elim
  import dvi_pkg::*;
#(
  parameter bit RESTORE_ELIM = 1'b1
) (
  input  dvi_op_t  op,
  input  regmask_t lvm,        // current Live Value Mask
  input  regmask_t stack_top,  // LVM snapshot at the top of the LVM-Stack
  output logic     elim_save,
  output logic     elim_restore,
  output logic     eliminate
);

  logic save_live, restore_live;

  // bit selects written as compare loops so synthesis builds plain selectors
  always_comb begin
    save_live    = 1'b0;
    restore_live = 1'b0;
    for (int i = 0; i < NUM_ARCH; i++) begin
      if (op.src1 == areg_t'(i)) save_live    = lvm[i];
      if (op.dst  == areg_t'(i)) restore_live = stack_top[i];
    end
    elim_save    = (op.kind == OP_LIVE_STORE) && !save_live;
    elim_restore = RESTORE_ELIM && (op.kind == OP_LIVE_LOAD) && !restore_live;
    eliminate    = elim_save || elim_restore;
  end

endmodule
