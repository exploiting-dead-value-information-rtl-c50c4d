// tb_rob: self-checking test of the reorder buffer at its default 64
// entries and 4 allocations, completions and commits per cycle. A queue
// model holds every allocated entry; completion happens out of order at
// random, and each cycle the commit outputs must present the oldest entries,
// only those done and consecutive from the head, at most four. Full and flush
// are exercised.
module tb_rob;
  import dvi_pkg::*;
  localparam int DEPTH = 64, PHYS = 50, W = 4;

  typedef struct {
    int              idx;
    bit              done;
    bit              has_dst;
    areg_t           dst;
    logic [5:0]      new_p;
    regmask_t        kill;
    logic [PHYS-1:0] free;
  } ent_t;

  logic            clk = 0, rst_n = 0, flush = 0;
  logic            alloc [W], alloc_done [W], alloc_has_dst [W];
  areg_t           alloc_dst [W];
  logic [5:0]      alloc_new_p [W];
  regmask_t        alloc_kill [W];
  logic [PHYS-1:0] alloc_free [W];
  logic [5:0]      alloc_idx [W];
  logic [6:0]      free_entries, count;
  logic            complete [W];
  logic [5:0]      complete_idx [W];
  logic            commit [W], commit_has_dst [W];
  logic [5:0]      commit_idx [W];
  areg_t           commit_dst [W];
  logic [5:0]      commit_new_p [W];
  regmask_t        commit_kill [W];
  logic [PHYS-1:0] commit_free [W];
  int              checks = 0, failures = 0, n_full = 0, n_commit = 0, n_flush = 0, n_multi = 0;

  ent_t model [$];
  int   m_tail = 0;

  rob dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      alloc[i] = 0; alloc_done[i] = 0; alloc_has_dst[i] = 0; alloc_dst[i] = '0;
      alloc_new_p[i] = '0; alloc_kill[i] = '0; alloc_free[i] = '0;
      complete[i] = 0; complete_idx[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int exp_nc, room, used, picks [W];
      @(negedge clk);
      flush  = 0;
      exp_nc = 0;
      while (exp_nc < W && exp_nc < model.size() && model[exp_nc].done) exp_nc++;
      checks++;
      if (free_entries !== 7'(DEPTH - model.size()) || count !== 7'(model.size())) begin
        failures++;
        $display("step %0d: free %0d count %0d, model holds %0d", n, free_entries, count, model.size());
      end
      for (int k = 0; k < W; k++) begin
        checks++;
        if (commit[k] !== (k < exp_nc)) begin
          failures++;
          $display("step %0d: commit[%0d]=%b expected %b", n, k, commit[k], k < exp_nc);
        end
        if (k < exp_nc && commit[k]) begin
          checks++;
          if (commit_idx[k] !== 6'(model[k].idx) || commit_has_dst[k] !== model[k].has_dst ||
              commit_dst[k] !== model[k].dst || commit_new_p[k] !== model[k].new_p ||
              commit_kill[k] !== model[k].kill || commit_free[k] !== model[k].free) begin
            failures++;
            $display("step %0d: commit slot %0d fields differ", n, k);
          end
        end
      end
      if (model.size() == DEPTH) n_full++;
      if (exp_nc > 1) n_multi++;
      // stimulus; the allocation rate swings so the buffer fills and drains
      room = DEPTH - model.size();
      used = 0;
      for (int i = 0; i < W; i++) begin
        alloc[i] = (used < room) && ($urandom_range(0, 99) < (((n / 2000) % 2 == 0) ? 80 : 25));
        if (alloc[i]) used++;
        alloc_done[i]    = ($urandom_range(0, 9) == 0);
        alloc_has_dst[i] = 1'($urandom_range(0, 1));
        alloc_dst[i]     = areg_t'($urandom);
        alloc_new_p[i]   = 6'($urandom_range(0, PHYS - 1));
        alloc_kill[i]    = $urandom;
        alloc_free[i]    = {$urandom, $urandom};
      end
      for (int k = 0; k < W; k++) begin
        picks[k]    = -1;
        complete[k] = 0;
        if (model.size() > 0 && $urandom_range(0, 99) < 60) begin
          int p;
          bit dup;
          p = $urandom_range(0, model.size() - 1);
          dup = 0;
          for (int j = 0; j < k; j++) if (picks[j] == p) dup = 1;
          if (!dup) begin
            picks[k] = p;
            complete[k] = 1;
            complete_idx[k] = 6'(model[p].idx);
          end
        end
      end
      flush = ($urandom_range(0, 999) == 0);
      #1;
      begin
        int nb;
        nb = 0;
        for (int i = 0; i < W; i++)
          if (alloc[i]) begin
            checks++;
            if (alloc_idx[i] !== 6'((m_tail + nb) % DEPTH)) begin
              failures++;
              $display("step %0d: alloc_idx[%0d]=%0d expected %0d", n, i, alloc_idx[i], (m_tail + nb) % DEPTH);
            end
            nb++;
          end
        if (!flush) m_tail = (m_tail + nb) % DEPTH;
        else m_tail = 0;
      end
      @(posedge clk);
      if (flush) begin
        model.delete();
        n_flush++;
      end else begin
        for (int k = 0; k < W; k++) if (picks[k] >= 0) model[picks[k]].done = 1;
        for (int c = 0; c < exp_nc; c++) begin
          void'(model.pop_front());
          n_commit++;
        end
        for (int i = 0; i < W; i++)
          if (alloc[i])
            model.push_back('{idx: int'(alloc_idx[i]), done: alloc_done[i], has_dst: alloc_has_dst[i],
                              dst: alloc_dst[i], new_p: alloc_new_p[i], kill: alloc_kill[i],
                              free: alloc_free[i]});
      end
    end
    checks++;
    if (n_full == 0 || n_commit == 0 || n_flush == 0 || n_multi == 0) begin
      failures++;
      $display("full %0d commits %0d flushes %0d multi %0d: not all exercised",
               n_full, n_commit, n_flush, n_multi);
    end
    $display("full cycles %0d commits %0d multi-commit cycles %0d flushes %0d",
             n_full, n_commit, n_multi, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
