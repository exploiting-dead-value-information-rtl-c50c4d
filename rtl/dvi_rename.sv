// dvi_rename: register renaming extended with dead-value information, for a
// decode group of up to W operations per cycle.
//
// The map table binds each architectural register to a physical register, as
// in an R10000-style renamer. Each entry carries one extra state bit, the
// Live Value Mask (LVM) bit: set when the register is written (destination
// renaming) and cleared when dead-value information declares its value dead.
// A kill goes further than clearing the bit: the register is unbound from its
// physical register, and that physical register is listed for release. The
// release itself happens only when the killing operation commits, because
// freeing a register cannot be undone; from then on the physical register can
// serve renaming of later operations, although no later write to the same
// architectural register has been seen. A later write to an unbound register
// frees nothing.
//
// Besides kills and writes the LVM changes in three ways: LVM-load replaces it
// (thread switch); a return copies the callee-saved bits back from the
// LVM-Stack snapshot taken at the call (bits outside callee_mask keep their
// value, since registers such as the return-value registers may have been
// written by the callee); a flush marks every register live. A binding bit
// (map_valid) is kept apart from the LVM bit, because a snapshot copied back
// at a return can mark a register dead while it still owns a physical
// register; that register is then freed by its next overwrite.
//
// The group is renamed by a chain of rename_slot instances, each seeing the
// state left by the older slots (so a write or a kill in slot 0 is visible to
// slot 1 in the same cycle). Slots are accepted in order up to the first one
// that cannot proceed; a call or return is the last slot accepted in a cycle.
// The drop decisions for live-stores and live-loads are made in the chain
// because they depend on the LVM as left by the older slots.
//
// Recovery: a second, committed copy of the map table and binding bits is
// updated as up to W operations commit per cycle. A flush copies it back and
// recomputes the free pool as every physical register the committed map does
// not use.
//
// Timing: all per-slot outputs are combinational from the state and the
// inputs of the cycle; the state changes at the clock edge.
module dvi_rename
  import dvi_pkg::*;
#(
  parameter int unsigned PHYS         = 50,
  parameter int unsigned W            = 4,
  parameter int unsigned ROB_DEPTH    = 64,
  parameter bit          RESTORE_ELIM = 1'b1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           flush,
  // decode group, slot 0 oldest
  input  logic                           in_valid     [W],
  input  dvi_op_t                        op           [W],
  input  regmask_t                       kill_vec     [W],   // from dvi_decode
  input  logic                           is_stack_op  [W],   // call or return
  input  logic                           pop          [W],   // return
  input  regmask_t                       stack_top,
  input  regmask_t                       callee_mask,
  input  logic [$clog2(ROB_DEPTH+1)-1:0] rob_free,
  output logic                           accept       [W],
  output logic                           dispatch     [W],
  output logic                           elim_save    [W],
  output logic                           elim_restore [W],
  output logic [$clog2(PHYS)-1:0]        src1_p       [W],
  output logic [$clog2(PHYS)-1:0]        src2_p       [W],
  output logic                           src1_bound   [W],
  output logic                           src2_bound   [W],
  output logic                           need_alloc   [W],
  output logic [$clog2(PHYS)-1:0]        dst_p        [W],
  output logic [PHYS-1:0]                free_mask    [W],   // released at commit
  output regmask_t                       lvm_before   [W],   // LVM seen by each slot
  output regmask_t                       lvm_after    [W],   // LVM left by each slot
  output regmask_t                       lvm,
  output regmask_t                       map_valid,
  output logic [$clog2(PHYS+1)-1:0]      free_count,
  // commit, oldest first, from the reorder buffer
  input  logic                           commit         [W],
  input  logic                           commit_has_dst [W],
  input  areg_t                          commit_dst     [W],
  input  logic [$clog2(PHYS)-1:0]        commit_new_p   [W],
  input  regmask_t                       commit_kill    [W],
  input  logic [PHYS-1:0]                commit_free    [W]
);

  localparam int unsigned TW = $clog2(PHYS);
  localparam int unsigned AW = $clog2(W + 1);
  localparam int unsigned RW = $clog2(ROB_DEPTH + 1);
  typedef logic [NUM_ARCH-1:0][TW-1:0] maptab_t;

  maptab_t         map_q, map_c;
  regmask_t        valid_q, valid_c, lvm_q;
  logic [PHYS-1:0] used_c, released;
  logic [TW-1:0]   alloc_tag [W];
  logic            alloc_ok  [W];
  logic [AW-1:0]   nalloc_fin;
  regmask_t        lvm_fin, valid_fin;
  maptab_t         map_fin;

  assign lvm       = lvm_q;
  assign map_valid = valid_q;

  always_comb begin
    released = '0;
    for (int k = 0; k < W; k++)
      if (commit[k]) released = released | commit_free[k];
  end

  free_list #(.PHYS(PHYS), .NUM_ARCH(NUM_ARCH), .W(W)) u_free (
    .clk, .rst_n,
    .alloc_tag, .alloc_ok,
    .alloc_cnt    (nalloc_fin),
    .release_mask (released),
    .recover      (flush),
    .recover_vec  (~used_c),
    .free_vec     (),
    .free_count
  );

  for (genvar i = 0; i < W; i++) begin : g_slot
    logic     en_i, cont_o;
    regmask_t lvm_i, valid_i, lvm_o, valid_o;
    maptab_t  map_i, map_o;
    logic [AW-1:0] nalloc_i, nalloc_o;
    logic [RW-1:0] nrob_i, nrob_o;

    if (i == 0) begin : g_first
      assign en_i     = !flush;
      assign lvm_i    = lvm_q;
      assign valid_i  = valid_q;
      assign map_i    = map_q;
      assign nalloc_i = '0;
      assign nrob_i   = '0;
    end else begin : g_next
      assign en_i     = g_slot[i-1].cont_o;
      assign lvm_i    = g_slot[i-1].lvm_o;
      assign valid_i  = g_slot[i-1].valid_o;
      assign map_i    = g_slot[i-1].map_o;
      assign nalloc_i = g_slot[i-1].nalloc_o;
      assign nrob_i   = g_slot[i-1].nrob_o;
    end

    rename_slot #(.PHYS(PHYS), .W(W), .ROB_DEPTH(ROB_DEPTH), .RESTORE_ELIM(RESTORE_ELIM)) u_slot (
      .en (en_i), .in_valid (in_valid[i]), .op (op[i]), .kill_vec (kill_vec[i]),
      .is_stack_op (is_stack_op[i]), .pop (pop[i]), .stack_top, .callee_mask,
      .lvm_i, .valid_i, .map_i, .nalloc_i, .nrob_i,
      .alloc_tag, .alloc_ok, .rob_free,
      .accept (accept[i]), .dispatch (dispatch[i]),
      .elim_save (elim_save[i]), .elim_restore (elim_restore[i]),
      .need_alloc (need_alloc[i]),
      .src1_p (src1_p[i]), .src2_p (src2_p[i]),
      .src1_bound (src1_bound[i]), .src2_bound (src2_bound[i]),
      .dst_p (dst_p[i]), .free_mask (free_mask[i]),
      .cont_o, .lvm_o, .valid_o, .map_o, .nalloc_o, .nrob_o
    );

    assign lvm_before[i] = lvm_i;
    assign lvm_after[i]  = lvm_o;
  end

  assign lvm_fin    = g_slot[W-1].lvm_o;
  assign valid_fin  = g_slot[W-1].valid_o;
  assign map_fin    = g_slot[W-1].map_o;
  assign nalloc_fin = g_slot[W-1].nalloc_o;

  // Physical registers held by the committed map.
  always_comb begin
    used_c = '0;
    for (int i = 0; i < NUM_ARCH; i++)
      for (int p = 0; p < PHYS; p++)
        if (valid_c[i] && map_c[i] == TW'(p)) used_c[p] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ARCH; i++) begin
        map_q[i] <= TW'(i);
        map_c[i] <= TW'(i);
      end
      valid_q <= '1;
      valid_c <= '1;
      lvm_q   <= '1;
    end else if (flush) begin
      map_q   <= map_c;
      valid_q <= valid_c;
      lvm_q   <= '1;
    end else begin
      map_q   <= map_fin;
      valid_q <= valid_fin;
      lvm_q   <= lvm_fin;
      begin
        maptab_t  m;
        regmask_t v;
        m = map_c;
        v = valid_c;
        // per architectural register: the youngest committing write wins
        for (int k = 0; k < W; k++)
          for (int r = 0; r < NUM_ARCH; r++)
            if (commit[k]) begin
              if (commit_kill[k][r]) v[r] = 1'b0;
              if (commit_has_dst[k] && commit_dst[k] == areg_t'(r)) begin
                m[r] = commit_new_p[k];
                v[r] = 1'b1;
              end
            end
        map_c   <= m;
        valid_c <= v;
      end
    end
  end

endmodule
