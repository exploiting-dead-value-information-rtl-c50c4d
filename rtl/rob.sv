// rob: reorder buffer that tracks operations from dispatch to in-order commit.
//
// The dead-value hardware needs it for one reason: freeing a physical
// register is irreversible, so a register released by an overwrite or by
// dead-value information may only return to the free pool once the operation
// that released it is non-speculative, i.e. commits. Each entry records what
// that operation changes in the committed rename state: its destination
// mapping, the registers it kills and the set of physical registers it frees.
//
// Interface: up to W entries are allocated per cycle, in slot order, for the
// slots with alloc[i] set; alloc_idx[i] is the index slot i receives (valid in
// the same cycle). The caller must not allocate more than free_entries.
// alloc_done marks entries that need no execution (kill instructions). Up to
// W executed entries are marked per cycle through complete/complete_idx. Up to
// W consecutive completed entries leave the head per cycle and are presented
// on commit_*[k], oldest first. flush empties the buffer (all uncommitted work
// squashed); nothing commits in a flush cycle. The depth defaults to the
// 64-entry instruction window.
module rob
  import dvi_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned PHYS  = 50,
  parameter int unsigned W     = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  // allocation
  input  logic                       alloc         [W],
  input  logic                       alloc_done    [W],
  input  logic                       alloc_has_dst [W],
  input  areg_t                      alloc_dst     [W],
  input  logic [$clog2(PHYS)-1:0]    alloc_new_p   [W],
  input  regmask_t                   alloc_kill    [W],
  input  logic [PHYS-1:0]            alloc_free    [W],
  output logic [$clog2(DEPTH)-1:0]   alloc_idx     [W],
  output logic [$clog2(DEPTH+1)-1:0] free_entries,
  output logic [$clog2(DEPTH+1)-1:0] count,
  // completion from the execution core
  input  logic                       complete      [W],
  input  logic [$clog2(DEPTH)-1:0]   complete_idx  [W],
  // commit, oldest first
  output logic                       commit        [W],
  output logic [$clog2(DEPTH)-1:0]   commit_idx    [W],
  output logic                       commit_has_dst[W],
  output areg_t                      commit_dst    [W],
  output logic [$clog2(PHYS)-1:0]    commit_new_p  [W],
  output regmask_t                   commit_kill   [W],
  output logic [PHYS-1:0]            commit_free   [W]
);

  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic                    done;
    logic                    has_dst;
    areg_t                   dst;
    logic [$clog2(PHYS)-1:0] new_p;
    regmask_t                kill;
    logic [PHYS-1:0]         free;
  } entry_t;

  entry_t          q [DEPTH];
  logic [IW-1:0]   head, tail;
  logic [CW-1:0]   cnt, n_alloc, n_commit;

  function automatic logic [IW-1:0] add(logic [IW-1:0] p, int unsigned k);
    return IW'((int'(p) + k) % DEPTH);
  endfunction

  assign count        = cnt;
  assign free_entries = CW'(DEPTH) - cnt;

  always_comb begin
    logic stop;
    n_alloc = '0;
    for (int i = 0; i < W; i++) begin
      alloc_idx[i] = add(tail, int'(n_alloc));
      if (alloc[i]) n_alloc = n_alloc + 1'b1;
    end
    n_commit = '0;
    stop     = flush;
    for (int k = 0; k < W; k++) begin
      commit[k]         = !stop && (CW'(k) < cnt) && q[add(head, k)].done;
      stop              = stop || !commit[k];
      if (commit[k]) n_commit = n_commit + 1'b1;
      commit_idx[k]     = add(head, k);
      commit_has_dst[k] = q[add(head, k)].has_dst;
      commit_dst[k]     = q[add(head, k)].dst;
      commit_new_p[k]   = q[add(head, k)].new_p;
      commit_kill[k]    = q[add(head, k)].kill;
      commit_free[k]    = q[add(head, k)].free;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else if (flush) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
    end else begin
      for (int k = 0; k < W; k++)
        if (complete[k]) q[complete_idx[k]].done <= 1'b1;
      for (int i = 0; i < W; i++)
        if (alloc[i])
          q[alloc_idx[i]] <= '{done: alloc_done[i], has_dst: alloc_has_dst[i], dst: alloc_dst[i],
                               new_p: alloc_new_p[i], kill: alloc_kill[i], free: alloc_free[i]};
      tail <= add(tail, int'(n_alloc));
      head <= add(head, int'(n_commit));
      cnt  <= cnt + n_alloc - n_commit;
    end
  end

  always_ff @(posedge clk)
    if (!flush) assert (n_alloc <= free_entries) else $error("rob: allocation beyond free entries");

endmodule
