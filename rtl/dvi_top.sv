// dvi_top: decode/rename-stage hardware that exploits dead value information
// (DVI) in an out-of-order core.
//
// The compiler (explicit kill instructions) and the calling convention
// (calls and returns kill the caller-saved registers) tell the processor which
// register values are dead. This block uses that in three ways:
//   * physical registers holding dead values are unbound at decode and
//     released when the kill commits, so a smaller register file suffices;
//   * a callee save (live-store) whose register is dead is not dispatched,
//     and the matching restore (live-load) is dropped too, judged by the LVM
//     snapshot taken at the call and kept on the LVM-Stack;
//   * the Live Value Mask can be stored and reloaded (LVM-save / LVM-load) so
//     a thread switch routine can skip saves and restores of dead registers.
//
// Pipeline view: a decode group of up to W classified operations (slot 0
// oldest) enters on in_*; in the same cycle each accepted slot is either
// dropped (elim_save / elim_restore) or renamed and dispatched on disp_* with
// a reorder-buffer index. Slots are accepted in order (in_accept is a
// prefix): a slot waits when it needs a physical register and none is left,
// when the reorder buffer is full, during a flush, or when an older slot of
// the group is a call or return (the LVM-Stack moves once per cycle). The
// core presents the slots that were not accepted again in the next cycle.
// The execution core (not part of this block) reports up to W completions per
// cycle on complete_*, up to W entries commit in order per cycle, and flush
// squashes everything uncommitted. The physical register file's ports are
// brought out for the core's read and write-back stages.
//
// Configuration: abi_mask holds the caller-saved set used for implicit DVI
// (clear it to turn implicit DVI off); callee_mask holds the callee-saved set
// restored from the LVM-Stack at a return.
//
// From the scheme: the LVM, explicit and implicit DVI, early release at
// commit, the save/restore drop rules with a 16-entry LVM-Stack, LVM-save and
// LVM-load, and the sizes (4-wide, 64-entry window, 50 physical registers,
// 8 read and 4 write ports). Own choices: the group/prefix interface, kills
// holding a reorder-buffer entry, the separate binding bit, callee_mask, and
// recovery by flushing to the committed state instead of checkpoints.
module dvi_top
  import dvi_pkg::*;
#(
  parameter int unsigned W            = 4,
  parameter int unsigned PHYS         = 50,
  parameter int unsigned ROB_DEPTH    = 64,
  parameter int unsigned STACK_DEPTH  = 16,
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned NREAD        = 8,
  parameter int unsigned NWRITE       = 4,
  parameter bit          RESTORE_ELIM = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  regmask_t                      abi_mask,
  input  regmask_t                      callee_mask,
  // decode group in, slot 0 oldest
  input  logic                          in_valid        [W],
  input  dvi_op_t                       in_op           [W],
  output logic                          in_accept       [W],
  // dispatch out
  output logic                          disp_valid      [W],
  output op_kind_e                      disp_kind       [W],
  output logic [$clog2(ROB_DEPTH)-1:0]  disp_rob_idx    [W],
  output logic [$clog2(PHYS)-1:0]       disp_src1_p     [W],
  output logic [$clog2(PHYS)-1:0]       disp_src2_p     [W],
  output logic                          disp_src1_bound [W],
  output logic                          disp_src2_bound [W],
  output logic                          disp_has_dst    [W],
  output logic [$clog2(PHYS)-1:0]       disp_dst_p      [W],
  output regmask_t                      lvm_save_data   [W],  // for OP_LVM_SAVE
  output logic                          elim_save       [W],
  output logic                          elim_restore    [W],
  // completion and recovery
  input  logic                          complete        [W],
  input  logic [$clog2(ROB_DEPTH)-1:0]  complete_idx    [W],
  input  logic                          flush,
  output logic                          commit          [W],
  output logic [$clog2(ROB_DEPTH)-1:0]  commit_idx      [W],
  // physical register file ports
  input  logic [$clog2(PHYS)-1:0]       rf_raddr [NREAD],
  output logic [DATA_W-1:0]             rf_rdata [NREAD],
  input  logic                          rf_we    [NWRITE],
  input  logic [$clog2(PHYS)-1:0]       rf_waddr [NWRITE],
  input  logic [DATA_W-1:0]             rf_wdata [NWRITE],
  // status
  output regmask_t                      lvm,
  output regmask_t                      map_valid,
  output logic [$clog2(PHYS+1)-1:0]     free_count,
  output logic [$clog2(ROB_DEPTH+1)-1:0] rob_count,
  output logic [$clog2(STACK_DEPTH+1)-1:0] stack_count,
  output logic                          stack_overflow,
  output logic                          stack_underflow
);

  localparam int unsigned TW = $clog2(PHYS);
  localparam int unsigned RW = $clog2(ROB_DEPTH + 1);

  regmask_t        kill_vec   [W];
  logic            push_d     [W];
  logic            pop_d      [W];
  logic            stack_op   [W];
  logic            need_alloc [W];
  logic            alloc_done [W];
  areg_t           dst_arch   [W];
  logic [PHYS-1:0] free_mask  [W];
  regmask_t        lvm_after  [W];
  regmask_t        stack_top, push_data;
  logic            push, pop;
  logic [RW-1:0]   rob_free;

  logic            c_has_dst [W];
  areg_t           c_dst     [W];
  logic [TW-1:0]   c_new_p   [W];
  regmask_t        c_kill    [W];
  logic [PHYS-1:0] c_free    [W];

  for (genvar i = 0; i < W; i++) begin : g_dec
    dvi_decode u_decode (
      .op (in_op[i]), .abi_mask, .kill_vec (kill_vec[i]), .push (push_d[i]), .pop (pop_d[i])
    );
    assign stack_op[i]   = push_d[i] || pop_d[i];
    assign alloc_done[i] = (in_op[i].kind == OP_KILL);
    assign dst_arch[i]   = in_op[i].dst;
    assign disp_kind[i]  = in_op[i].kind;
    assign disp_has_dst[i] = need_alloc[i];
  end

  // At most one call or return is accepted per cycle: it is the last slot.
  always_comb begin
    push      = 1'b0;
    pop       = 1'b0;
    push_data = '0;
    for (int i = 0; i < W; i++)
      if (in_accept[i] && push_d[i]) begin
        push      = 1'b1;
        push_data = lvm_after[i];
      end else if (in_accept[i] && pop_d[i]) begin
        pop = 1'b1;
      end
  end

  lvm_stack #(.DEPTH(STACK_DEPTH), .WIDTH(NUM_ARCH)) u_stack (
    .clk, .rst_n, .flush,
    .push, .push_data, .pop,
    .top       (stack_top),
    .empty     (),
    .count     (stack_count),
    .overflow  (stack_overflow),
    .underflow (stack_underflow)
  );

  dvi_rename #(.PHYS(PHYS), .W(W), .ROB_DEPTH(ROB_DEPTH), .RESTORE_ELIM(RESTORE_ELIM)) u_rename (
    .clk, .rst_n, .flush,
    .in_valid, .op (in_op), .kill_vec, .is_stack_op (stack_op), .pop (pop_d),
    .stack_top, .callee_mask, .rob_free,
    .accept (in_accept), .dispatch (disp_valid),
    .elim_save, .elim_restore,
    .src1_p (disp_src1_p), .src2_p (disp_src2_p),
    .src1_bound (disp_src1_bound), .src2_bound (disp_src2_bound),
    .need_alloc, .dst_p (disp_dst_p), .free_mask,
    .lvm_before (lvm_save_data), .lvm_after,
    .lvm, .map_valid, .free_count,
    .commit, .commit_has_dst (c_has_dst), .commit_dst (c_dst),
    .commit_new_p (c_new_p), .commit_kill (c_kill), .commit_free (c_free)
  );

  rob #(.DEPTH(ROB_DEPTH), .PHYS(PHYS), .W(W)) u_rob (
    .clk, .rst_n, .flush,
    .alloc         (disp_valid),
    .alloc_done,
    .alloc_has_dst (need_alloc),
    .alloc_dst     (dst_arch),
    .alloc_new_p   (disp_dst_p),
    .alloc_kill    (kill_vec),
    .alloc_free    (free_mask),
    .alloc_idx     (disp_rob_idx),
    .free_entries  (rob_free),
    .count         (rob_count),
    .complete, .complete_idx,
    .commit, .commit_idx,
    .commit_has_dst (c_has_dst), .commit_dst (c_dst), .commit_new_p (c_new_p),
    .commit_kill (c_kill), .commit_free (c_free)
  );

  phys_regfile #(.PHYS(PHYS), .DATA_W(DATA_W), .NREAD(NREAD), .NWRITE(NWRITE)) u_rf (
    .clk, .rst_n,
    .raddr (rf_raddr), .rdata (rf_rdata),
    .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata)
  );

endmodule
