// tb_dvi_rename: self-checking test of DVI-aware renaming at the default
// 50 physical registers and 4 operations per cycle.
//
// First a directed run of the early-release example, one operation per
// cycle: r1 is written, its value is killed, and once the kill commits the
// physical register that held it is back in the free pool and is handed to
// an unrelated write while r1 is still unbound. Then a long random run of
// 4-wide groups. This testbench plays the reorder buffer (it queues every
// dispatched operation and commits up to four per cycle in order) and keeps
// its own model of the speculative and committed map, the binding bits, the
// LVM and the free pool, which it walks slot by slot like the hardware must:
// a later slot sees the writes, kills and LVM changes of the older ones.
// Every cycle all per-slot outputs are compared with the model. Kills,
// returns with LVM-Stack snapshots, LVM loads, dropped saves and restores,
// running out of registers or reorder-buffer room, group cuts after a call
// or return, and flushes all occur and are counted.
module tb_dvi_rename;
  import dvi_pkg::*;
  localparam int PHYS = 50, W = 4;

  typedef struct {
    bit              has_dst;
    areg_t           dst;
    logic [5:0]      new_p;
    regmask_t        kill;
    logic [PHYS-1:0] free;
  } rob_t;

  logic            clk = 0, rst_n = 0, flush = 0;
  logic            in_valid [W], is_stack_op [W], pop [W];
  dvi_op_t         op [W];
  regmask_t        kill_vec [W];
  regmask_t        stack_top = '1, callee_mask;
  logic [6:0]      rob_free = 7'd64;
  logic            accept [W], dispatch [W], elim_save [W], elim_restore [W];
  logic [5:0]      src1_p [W], src2_p [W], dst_p [W];
  logic            src1_bound [W], src2_bound [W], need_alloc [W];
  logic [PHYS-1:0] free_mask [W];
  regmask_t        lvm_before [W], lvm_after [W], lvm, map_valid;
  logic [5:0]      free_count;
  logic            commit [W], commit_has_dst [W];
  areg_t           commit_dst [W];
  logic [5:0]      commit_new_p [W];
  regmask_t        commit_kill [W];
  logic [PHYS-1:0] commit_free [W];

  int checks = 0, failures = 0;
  int n_reclaim = 0, n_stall_reg = 0, n_stall_rob = 0, n_pop = 0, n_load = 0, n_flush = 0,
      n_elim = 0, n_cut = 0, n_full_group = 0;

  // reference model
  int              m_map [32], c_map [32];
  regmask_t        m_valid, c_valid, m_lvm;
  logic [PHYS-1:0] m_free;
  rob_t            q [$];
  // expected results of the current group
  bit              x_acc [W], x_disp [W];
  rob_t            x_ent [W];
  int              x_nalloc;
  regmask_t        x_lvm, x_valid;
  int              x_map [32];

  dvi_rename dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nth(logic [PHYS-1:0] v, int k);
    for (int i = 0; i < PHYS; i++) if (v[i]) begin if (k == 0) return i; k--; end
    return -1;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  // Walk the group slot by slot through the model and compare.
  task automatic compare_outputs();
    regmask_t lv, vl;
    int       mp [32];
    int       nalloc, nrob;
    bit       en;
    lv = m_lvm; vl = m_valid; mp = m_map;
    nalloc = 0; nrob = 0;
    en = !flush;
    for (int i = 0; i < W; i++) begin
      bit es, er, el, na, have, acc, dsp;
      logic [PHYS-1:0] fm;
      regmask_t vk, ln;
      es   = (op[i].kind == OP_LIVE_STORE) && !lv[op[i].src1];
      er   = (op[i].kind == OP_LIVE_LOAD) && !stack_top[op[i].dst];
      el   = es || er;
      na   = op[i].has_dst && !el;
      have = (nth(m_free, nalloc) >= 0) && nalloc < W;
      acc  = en && in_valid[i] && (!na || have) && (el || nrob < int'(rob_free));
      dsp  = acc && !el;
      check($sformatf("slot %0d accept", i),   64'(accept[i]),   64'(acc));
      check($sformatf("slot %0d dispatch", i), 64'(dispatch[i]), 64'(dsp));
      check($sformatf("slot %0d elim", i),     64'({elim_save[i], elim_restore[i]}), 64'({acc && es, acc && er}));
      check($sformatf("slot %0d need_alloc", i), 64'(need_alloc[i]), 64'(na));
      check($sformatf("slot %0d src tags", i), 64'({src1_p[i], src2_p[i]}), 64'({6'(mp[op[i].src1]), 6'(mp[op[i].src2])}));
      check($sformatf("slot %0d src bound", i), 64'({src1_bound[i], src2_bound[i]}), 64'({vl[op[i].src1], vl[op[i].src2]}));
      check($sformatf("slot %0d lvm_before", i), 64'(lvm_before[i]), 64'(lv));
      if (have) check($sformatf("slot %0d dst_p", i), 64'(dst_p[i]), 64'(nth(m_free, nalloc)));
      fm = '0;
      vk = vl;
      for (int r = 0; r < 32; r++)
        if (kill_vec[i][r] && vl[r]) begin fm[mp[r]] = 1'b1; vk[r] = 1'b0; end
      if (na) begin
        if (vk[op[i].dst]) fm[mp[op[i].dst]] = 1'b1;
        vk[op[i].dst] = 1'b1;
      end
      ln = (op[i].kind == OP_LVM_LOAD) ? op[i].lvm_data : lv;
      ln = ln & ~kill_vec[i];
      if (pop[i]) ln = (ln & ~callee_mask) | (stack_top & callee_mask);
      if (na) ln[op[i].dst] = 1'b1;
      if (dsp) begin
        check($sformatf("slot %0d free_mask", i), 64'(free_mask[i]), 64'(fm));
        x_ent[i] = '{has_dst: na, dst: op[i].dst, new_p: 6'(nth(m_free, nalloc)),
                     kill: kill_vec[i], free: fm};
        lv = ln; vl = vk;
        if (na) begin mp[op[i].dst] = nth(m_free, nalloc); nalloc++; end
        nrob++;
      end
      check($sformatf("slot %0d lvm_after", i), 64'(lvm_after[i]), 64'(lv));
      x_acc[i] = acc; x_disp[i] = dsp;
      if (acc && el) n_elim++;
      if (acc && pop[i]) n_pop++;
      if (acc && op[i].kind == OP_LVM_LOAD) n_load++;
      if (dsp && op[i].kind == OP_KILL && (kill_vec[i] & vl) != kill_vec[i]) n_reclaim++;
      if (en && in_valid[i] && !acc) begin
        if (na && !have) n_stall_reg++; else n_stall_rob++;
      end
      if (acc && is_stack_op[i] && i < W - 1 && in_valid[i+1]) n_cut++;
      if (i == W - 1 && acc) n_full_group++;
      en = acc && !is_stack_op[i];
    end
    x_lvm = lv; x_valid = vl; x_map = mp; x_nalloc = nalloc;
    check("lvm",        64'(lvm),        64'(m_lvm));
    check("map_valid",  64'(map_valid),  64'(m_valid));
    check("free_count", 64'(free_count), 64'($countones(m_free)));
  endtask

  // Advance the model by one clock edge with the current inputs.
  task automatic model_step();
    logic [PHYS-1:0] taken;
    if (flush) begin
      m_map   = c_map;
      m_valid = c_valid;
      m_lvm   = '1;
      m_free  = '1;
      for (int i = 0; i < 32; i++) if (c_valid[i]) m_free[c_map[i]] = 1'b0;
      q.delete();
      return;
    end
    taken = '0;
    for (int k = 0; k < x_nalloc; k++) taken[nth(m_free, k)] = 1'b1;
    for (int k = 0; k < W; k++)
      if (commit[k]) begin
        rob_t e;
        e = q.pop_front();
        c_valid = c_valid & ~e.kill;
        if (e.has_dst) begin c_map[e.dst] = int'(e.new_p); c_valid[e.dst] = 1'b1; end
        m_free = m_free | e.free;
      end
    m_free  = m_free & ~taken;
    m_lvm   = x_lvm;
    m_valid = x_valid;
    m_map   = x_map;
    for (int i = 0; i < W; i++) if (x_disp[i]) q.push_back(x_ent[i]);
  endtask

  task automatic idle_inputs();
    flush = 0;
    for (int i = 0; i < W; i++) begin
      in_valid[i] = 0; is_stack_op[i] = 0; pop[i] = 0; kill_vec[i] = '0; op[i] = '0;
      commit[i] = 0;
    end
  endtask

  task automatic drive_commit(int max);
    for (int k = 0; k < W; k++) begin
      commit[k] = (k < max) && (k < q.size());
      if (commit[k]) begin
        commit_has_dst[k] = q[k].has_dst;
        commit_dst[k]     = q[k].dst;
        commit_new_p[k]   = q[k].new_p;
        commit_kill[k]    = q[k].kill;
        commit_free[k]    = q[k].free;
      end
    end
  endtask

  task automatic cycle();
    #1 compare_outputs();
    @(posedge clk);
    model_step();
    @(negedge clk);
  endtask

  task automatic write1(int r);
    idle_inputs(); in_valid[0] = 1; op[0].has_dst = 1; op[0].dst = areg_t'(r);
    cycle();
  endtask

  task automatic drain();
    while (q.size() > 0) begin idle_inputs(); drive_commit(W); cycle(); end
  endtask

  initial begin
    int p_r1, p_kill;
    callee_mask = 32'h40ff_0000;  // r16..r23, r30
    for (int i = 0; i < 32; i++) begin m_map[i] = i; c_map[i] = i; end
    m_valid = '1; c_valid = '1; m_lvm = '1;
    for (int i = 0; i < PHYS; i++) m_free[i] = (i >= 32);
    for (int k = 0; k < W; k++) begin
      commit_has_dst[k] = 0; commit_dst[k] = '0; commit_new_p[k] = '0;
      commit_kill[k] = '0; commit_free[k] = '0;
    end
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- directed: early release of a killed register ----
    for (int r = 2; r < 19; r++) write1(r);   // all but one free register used
    idle_inputs(); in_valid[0] = 1; op[0].has_dst = 1; op[0].dst = 5'd1;
    p_r1 = int'(dst_p[0]);                      // I1: r1 <- ...
    cycle();
    check("pool empty", 64'(free_count), 64'(0));
    idle_inputs(); in_valid[0] = 1; op[0].kind = OP_KILL; kill_vec[0] = 32'h2;
    p_kill = m_map[1];                           // I3: kill r1
    check("r1 bound before the kill", 64'(p_kill), 64'(p_r1));
    cycle();
    check("r1 unbound after kill", 64'(map_valid[1]), 64'(0));
    check("killed register not free before commit", 64'(free_count), 64'(0));
    drain();
    check("killed register free after commit", 64'(m_free[p_kill]), 64'(1));
    for (int k = 0; k < PHYS; k++) begin
      idle_inputs(); in_valid[0] = 1; op[0].has_dst = 1; op[0].dst = areg_t'(5 + k % 10);
      if (int'(dst_p[0]) == p_kill) begin
        n_reclaim++;
        check("r1 still unbound when its register is reused", 64'(map_valid[1]), 64'(0));
        cycle();
        break;
      end
      cycle();
    end
    checks++;
    if (n_reclaim == 0) begin failures++; $display("released register never reused"); end
    drain();

    // ---- random run ----
    for (int n = 0; n < 20000; n++) begin
      int ph;
      idle_inputs();
      ph = (n / 300) % 2;   // 0: mostly renaming, 1: mostly committing
      for (int i = 0; i < W; i++) begin
        op[i]          = dvi_op_t'({$urandom, $urandom, $urandom});
        op[i].kind     = op_kind_e'($urandom_range(0, 7));
        if (ph == 0 && $urandom_range(0, 1) == 0) op[i].kind = OP_NORMAL;
        op[i].has_dst  = (op[i].kind inside {OP_NORMAL, OP_CALL, OP_LIVE_LOAD}) && ($urandom_range(0, 3) != 0);
        if (op[i].kind == OP_KILL) kill_vec[i] = $urandom & $urandom & $urandom;
        else if (op[i].kind inside {OP_CALL, OP_RETURN}) kill_vec[i] = 32'h0300_ff02;
        is_stack_op[i] = op[i].kind inside {OP_CALL, OP_RETURN};
        pop[i]         = (op[i].kind == OP_RETURN);
        in_valid[i]    = ($urandom_range(0, 99) < (ph == 0 ? 90 : 30));
      end
      stack_top = $urandom;
      // usually the true room left; sometimes less, as if other work held entries
      if ($urandom_range(0, 3) == 0) rob_free = 7'($urandom_range(0, 64 - q.size()));
      else                           rob_free = 7'(64 - q.size());
      drive_commit((ph == 0) ? $urandom_range(0, 1) : $urandom_range(0, 4));
      if ($urandom_range(0, 299) == 0) begin
        flush = 1; n_flush++;
        for (int k = 0; k < W; k++) commit[k] = 0;
      end
      cycle();
    end
    checks++;
    if (n_reclaim == 0 || n_stall_reg == 0 || n_stall_rob == 0 || n_pop == 0 || n_load == 0 ||
        n_flush == 0 || n_elim == 0 || n_cut == 0 || n_full_group == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("releases %0d reg-stalls %0d rob-stalls %0d pops %0d lvm-loads %0d flushes %0d dropped %0d",
             n_reclaim, n_stall_reg, n_stall_rob, n_pop, n_load, n_flush, n_elim);
    $display("group cuts at call/return %0d, full 4-wide groups %0d", n_cut, n_full_group);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
