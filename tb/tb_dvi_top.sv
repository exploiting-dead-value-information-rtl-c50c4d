// tb_dvi_top: end-to-end test of the DVI rename-stage hardware at its
// default sizes (4 operations per cycle, 50 physical registers, 64-entry
// reorder buffer, 16-entry LVM-Stack, 8-read/4-write register file).
//
// The testbench keeps a queue of program operations and offers the next
// four every cycle; the top accepts a prefix of them (it stops after a call
// or a return, when registers or reorder-buffer entries run out, and during
// a flush) and the rest are offered again in the next cycle.
//
// Part 1 replays the save/restore example: a caller whose r16 is live calls
// a procedure that saves, overwrites and restores r16 (nothing may be
// dropped), then a caller that kills r16 before the call (the save and the
// restore must both be dropped, and after the return r16 is dead again).
//
// Part 2 runs a random program of nested calls and returns, explicit kills,
// saves and restores, LVM-save/LVM-load pairs and rare flushes. This
// testbench acts as the execution core: every dispatched operation writes a
// fresh value into its destination physical register through the write port
// of its slot, completes after a random delay, and the testbench keeps the
// architectural values (both speculative and committed) itself. Every source
// read of a bound register is checked against the value the program last
// wrote to it (or, when an older operation of the same group wrote it,
// against that operation's destination tag), so any mistake in renaming or
// in early release of registers shows up as a wrong value. The save/restore
// drop decisions are compared with a separate liveness model with an
// unbounded snapshot list of which only the newest 16 count. Each mechanism
// (kills, implicit kills, dropped and kept saves and restores, stack overflow
// and underflow, free-list and reorder-buffer stalls, early release,
// LVM save/load, flush, groups of several operations, multiple commits per
// cycle) is counted and must occur.
module tb_dvi_top;
  import dvi_pkg::*;
  localparam int PHYS = 50, ROBD = 64, SD = 16, W = 4;

  logic        clk = 0, rst_n = 0;
  regmask_t    abi_mask, callee_mask;
  logic        in_valid [W], in_accept [W];
  dvi_op_t     in_op [W];
  logic        disp_valid [W], disp_src1_bound [W], disp_src2_bound [W], disp_has_dst [W];
  op_kind_e    disp_kind [W];
  logic [5:0]  disp_rob_idx [W], disp_src1_p [W], disp_src2_p [W], disp_dst_p [W];
  regmask_t    lvm_save_data [W], lvm, map_valid;
  logic        elim_save [W], elim_restore [W];
  logic        complete [W], flush = 0, commit [W];
  logic [5:0]  complete_idx [W], commit_idx [W];
  logic [5:0]  rf_raddr [8];
  logic [31:0] rf_rdata [8];
  logic        rf_we    [4];
  logic [5:0]  rf_waddr [4];
  logic [31:0] rf_wdata [4];
  logic [5:0]  free_count;
  logic [6:0]  rob_count;
  logic [4:0]  stack_count;
  logic        stack_overflow, stack_underflow;

  dvi_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_kill = 0, n_idvi = 0, n_elim_save = 0, n_elim_restore = 0, n_keep_save = 0,
      n_keep_restore = 0, n_ovf = 0, n_udf = 0, n_fl_stall = 0, n_rob_stall = 0,
      n_early = 0, n_lvm_save = 0, n_lvm_load = 0, n_flush = 0, n_reads = 0, n_commit = 0,
      n_multi = 0, n_cut = 0, n_multi_commit = 0, n_cycles = 0;

  // ---- core / program model ----
  typedef struct { dvi_op_t o; logic [31:0] v; int id; } pent_t;
  pent_t       prog [$];                  // operations not yet accepted
  bit          elim_of [int];             // drop decision per operation id
  int          next_id = 0;
  logic [31:0] val   [32], val_c [32];   // architectural values
  regmask_t    bnd, bnd_c;                // model of register binding
  regmask_t    m_lvm;
  regmask_t    m_stack [$];
  typedef struct { bit has_dst; int dst; logic [31:0] v; regmask_t kill; } rent_t;
  rent_t       rent [ROBD];
  int          pending [$];               // dispatched, not yet completed
  logic [31:0] wval [W];
  int          comp_rate = 60;
  int          stalled = 0;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rf_raddr[2*i]   = disp_src1_p[i];
      rf_raddr[2*i+1] = disp_src2_p[i];
      rf_we[i]        = disp_valid[i] && disp_has_dst[i];
      rf_waddr[i]     = disp_dst_p[i];
      rf_wdata[i]     = wval[i];
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  function automatic dvi_op_t mk(op_kind_e k);
    dvi_op_t o;
    o = '0;
    o.kind = k;
    return o;
  endfunction

  function automatic regmask_t stack_top_model();
    return (m_stack.size() == 0) ? '1 : m_stack[$];
  endfunction

  // Append an operation to the program; returns its id.
  function automatic int issue(dvi_op_t o);
    prog.push_back('{o: o, v: $urandom, id: next_id});
    next_id++;
    return next_id - 1;
  endfunction

  // One clock cycle: offer up to W operations, complete some dispatched
  // ones, check everything that happens in the cycle and update the model.
  task automatic cycle();
    int       np, nacc, ncommit;
    bit       s_commit [W];
    int       s_cidx [W];
    int       wr_slot [32];
    regmask_t kv;
    np = (prog.size() < W) ? prog.size() : W;
    for (int i = 0; i < W; i++) begin
      in_valid[i] = (i < np);
      in_op[i]    = (i < np) ? prog[i].o : '0;
      wval[i]     = (i < np) ? prog[i].v : '0;
      complete[i] = 0;
      complete_idx[i] = '0;
      // random completions; a core that stalls long enough drains its work
      if (pending.size() > 0 && ($urandom_range(0, 99) < comp_rate || stalled > 30)) begin
        int ci;
        ci = $urandom_range(0, pending.size() - 1);
        complete[i]     = 1;
        complete_idx[i] = 6'(pending[ci]);
        pending.delete(ci);
      end
    end
    for (int r = 0; r < 32; r++) wr_slot[r] = -1;
    #1;
    ncommit = 0;
    for (int k = 0; k < W; k++) begin
      s_commit[k] = commit[k];
      s_cidx[k]   = int'(commit_idx[k]);
      if (commit[k]) ncommit++;
    end
    if (ncommit > 1) n_multi_commit++;
    nacc = 0;
    while (nacc < W && in_accept[nacc]) nacc++;
    for (int i = nacc; i < W; i++) check("accepted slots form a prefix", 64'(in_accept[i]), 64'(0));
    check("nothing accepted beyond the offer", 64'(nacc <= np), 64'(1));
    if (stack_overflow) n_ovf++;
    if (stack_underflow) n_udf++;
    if (np > 0 && nacc == 0) stalled++; else stalled = 0;
    if (nacc > 1) n_multi++;
    for (int i = 0; i < nacc; i++) begin
      dvi_op_t o;
      bit      was_elim;
      o = prog[i].o;
      // save/restore drop decision against the liveness model
      check("elim_save", 64'(elim_save[i]),
            64'(o.kind == OP_LIVE_STORE && !m_lvm[o.src1]));
      check("elim_restore", 64'(elim_restore[i]),
            64'(o.kind == OP_LIVE_LOAD && !stack_top_model()[o.dst]));
      was_elim = elim_save[i] || elim_restore[i];
      elim_of[prog[i].id] = was_elim;
      check("disp_valid", 64'(disp_valid[i]), 64'(!was_elim));
      check("disp_kind", 64'(disp_kind[i]), 64'(o.kind));
      // data read through the renamed sources
      if (disp_valid[i] && o.has_src1 && bnd[o.src1]) begin
        if (wr_slot[o.src1] >= 0) check("src1 tag from older slot", 64'(disp_src1_p[i]), 64'(disp_dst_p[wr_slot[o.src1]]));
        else check("src1 value", 64'(rf_rdata[2*i]), 64'(val[o.src1]));
        n_reads++;
      end
      if (disp_valid[i] && o.has_src2 && bnd[o.src2]) begin
        if (wr_slot[o.src2] >= 0) check("src2 tag from older slot", 64'(disp_src2_p[i]), 64'(disp_dst_p[wr_slot[o.src2]]));
        else check("src2 value", 64'(rf_rdata[2*i+1]), 64'(val[o.src2]));
        n_reads++;
      end
      if (o.kind == OP_LVM_SAVE) begin
        check("lvm_save_data", 64'(lvm_save_data[i]), 64'(m_lvm)); n_lvm_save++;
      end
      if (elim_save[i]) n_elim_save++;
      if (elim_restore[i]) n_elim_restore++;
      if (!was_elim && o.kind == OP_LIVE_STORE) n_keep_save++;
      if (!was_elim && o.kind == OP_LIVE_LOAD) n_keep_restore++;
      if (!was_elim) begin
        int idx;
        idx = int'(disp_rob_idx[i]);
        kv = '0;
        if (o.kind == OP_KILL) kv = edvi_expand(o.kill_hi, o.kill_mask);
        if (o.kind inside {OP_CALL, OP_RETURN}) kv = abi_mask;
        kv[0] = 1'b0;
        if (o.kind == OP_KILL) begin
          n_kill++;
          if ((kv & bnd) != '0) n_early++;
        end
        if (o.kind inside {OP_CALL, OP_RETURN}) begin
          n_idvi++;
          if (i < np - 1) n_cut++;
          check("group ends after a call or return", 64'(i), 64'(nacc - 1));
        end
        if (o.kind == OP_LVM_LOAD) n_lvm_load++;
        rent[idx] = '{has_dst: o.has_dst, dst: int'(o.dst), v: prog[i].v, kill: kv};
        if (o.kind != OP_KILL) pending.push_back(idx);
        // liveness model, in the same order as the hardware applies it
        if (o.kind == OP_LVM_LOAD) m_lvm = o.lvm_data;
        m_lvm = m_lvm & ~kv;
        if (o.kind == OP_RETURN) begin
          m_lvm = (m_lvm & ~callee_mask) | (stack_top_model() & callee_mask);
          if (m_stack.size() > 0) void'(m_stack.pop_back());
        end
        if (o.has_dst) m_lvm[o.dst] = 1'b1;
        if (o.kind == OP_CALL) begin
          m_stack.push_back(m_lvm);
          if (m_stack.size() > SD) void'(m_stack.pop_front());
        end
        bnd = bnd & ~kv;
        for (int r = 0; r < 32; r++) if (kv[r]) wr_slot[r] = -1;
        if (o.has_dst) begin val[o.dst] = prog[i].v; bnd[o.dst] = 1'b1; wr_slot[o.dst] = i; end
      end
    end
    // why the first offered operation that was not taken had to wait
    if (nacc < np && !flush && !(nacc > 0 && prog[nacc-1].o.kind inside {OP_CALL, OP_RETURN})) begin
      int ndisp;
      ndisp = 0;
      for (int i = 0; i < nacc; i++) if (disp_valid[i]) ndisp++;
      if (int'(rob_count) + ndisp >= ROBD) n_rob_stall++;
      else n_fl_stall++;
    end
    @(posedge clk);
    n_cycles++;
    for (int k = 0; k < W; k++)
      if (s_commit[k]) begin
        rent_t e;
        e = rent[s_cidx[k]];
        bnd_c = bnd_c & ~e.kill;
        if (e.has_dst) begin val_c[e.dst] = e.v; bnd_c[e.dst] = 1'b1; end
        n_commit++;
      end
    for (int i = 0; i < nacc; i++) void'(prog.pop_front());
    @(negedge clk);
    for (int i = 0; i < W; i++) begin complete[i] = 0; in_valid[i] = 0; end
  endtask

  // Run until every queued operation has been accepted.
  task automatic run_all();
    while (prog.size() > 0) cycle();
  endtask

  task automatic idle_cycles(int n);
    int saved;
    saved = comp_rate;
    comp_rate = 100;
    for (int k = 0; k < n; k++) cycle();
    comp_rate = saved;
  endtask

  task automatic do_flush();
    run_all();
    flush = 1;
    @(posedge clk);
    val   = val_c;
    bnd   = bnd_c;
    m_lvm = '1;
    m_stack.delete();
    pending.delete();
    @(negedge clk);
    flush = 0;
    n_flush++;
  endtask

  // helpers for part 1
  function automatic dvi_op_t op_rd(int r);
    dvi_op_t o; o = mk(OP_NORMAL); o.has_src1 = 1; o.src1 = areg_t'(r); return o;
  endfunction
  function automatic dvi_op_t op_wr(int r);
    dvi_op_t o; o = mk(OP_NORMAL); o.has_dst = 1; o.dst = areg_t'(r); return o;
  endfunction

  task automatic procedure_body(output bit save_el, output bit rest_el);
    dvi_op_t o;
    int      id_s, id_r;
    o = mk(OP_LIVE_STORE); o.has_src1 = 1; o.src1 = 5'd16; o.has_src2 = 1; o.src2 = 5'd29;
    id_s = issue(o);                   // I3 save r16
    void'(issue(op_wr(16)));               // I4 r16 <-
    void'(issue(op_rd(16)));               // I5 <- r16
    o = mk(OP_LIVE_LOAD); o.has_dst = 1; o.dst = 5'd16; o.has_src1 = 1; o.src1 = 5'd29;
    id_r = issue(o);                   // I6 restore r16
    o = mk(OP_RETURN); o.has_src1 = 1; o.src1 = 5'd31;
    void'(issue(o));                       // I7 return
    run_all();
    save_el = elim_of[id_s];
    rest_el = elim_of[id_r];
  endtask

  initial begin
    bit se, re;
    dvi_op_t o;
    abi_mask    = 32'h0300_ff02;            // r1, r8..r15, r24, r25
    callee_mask = 32'h40ff_0000;            // r16..r23, r30
    for (int i = 0; i < W; i++) begin
      in_valid[i] = 0; in_op[i] = '0; complete[i] = 0; complete_idx[i] = '0; wval[i] = '0;
    end
    for (int i = 0; i < 32; i++) begin val[i] = '0; val_c[i] = '0; end
    bnd = '1; bnd_c = '1; m_lvm = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- part 1: the save/restore example ----
    for (int r = 1; r < 32; r++) void'(issue(op_wr(r)));   // give every register a value
    // caller1: r16 live across the call
    void'(issue(op_rd(16)));
    o = mk(OP_CALL); o.has_dst = 1; o.dst = 5'd31;
    void'(issue(o));
    procedure_body(se, re);
    check("caller1: save kept", 64'(se), 64'(0));
    check("caller1: restore kept", 64'(re), 64'(0));
    check("caller1: r16 live after return", 64'(lvm[16]), 64'(1));
    // caller2: r16 dead, killed before the call
    void'(issue(op_rd(16)));                                 // I1
    o = mk(OP_KILL); o.kill_hi = 1; o.kill_mask = 16'h0001;
    void'(issue(o));                                         // E2 kill r16
    run_all();
    check("r16 dead after kill", 64'(lvm[16]), 64'(0));
    o = mk(OP_CALL); o.has_dst = 1; o.dst = 5'd31;
    void'(issue(o));                                         // I2 call
    run_all();
    check("snapshot pushed", 64'(stack_count), 64'(1));
    procedure_body(se, re);
    check("caller2: save dropped", 64'(se), 64'(1));
    check("caller2: restore dropped", 64'(re), 64'(1));
    check("caller2: r16 dead after return", 64'(lvm[16]), 64'(0));
    check("caller2: caller-saved r8 dead after return", 64'(lvm[8]), 64'(0));
    void'(issue(op_wr(16)));                                 // I8 r16 <-
    idle_cycles(80);
    check("all committed", 64'(rob_count), 64'(0));

    // ---- part 2: random program ----
    begin
      int depth;
      depth = 0;
      for (int n = 0; n < 30000; n++) begin
        int r;
        int ph;
        ph = (n / 500) % 4;
        // phase 1: no completions, few destinations -> reorder buffer fills
        // phase 3: no completions, many destinations -> free list runs dry
        comp_rate = (ph == 1 || ph == 3) ? 0 : 70;
        r = $urandom_range(0, 99);
        if (r < 8 && depth < 24) begin
          // kill some callee-saved registers, then call
          o = mk(OP_KILL); o.kill_hi = 1; o.kill_mask = 16'($urandom) & 16'h40ff;
          void'(issue(o));
          o = mk(OP_CALL); o.has_dst = 1; o.dst = 5'd31;
          void'(issue(o));
          depth++;
          // prologue: save a few callee-saved registers
          for (int s = 16; s < 24; s++)
            if ($urandom_range(0, 1) == 1) begin
              o = mk(OP_LIVE_STORE); o.has_src1 = 1; o.src1 = areg_t'(s);
              o.has_src2 = 1; o.src2 = 5'd29;
              void'(issue(o));
            end
        end else if (r < 16 && (depth > 0 || r < 9)) begin
          // epilogue: restore, return
          for (int s = 16; s < 24; s++)
            if ($urandom_range(0, 1) == 1) begin
              o = mk(OP_LIVE_LOAD); o.has_dst = 1; o.dst = areg_t'(s);
              o.has_src1 = 1; o.src1 = 5'd29;
              void'(issue(o));
            end
          o = mk(OP_RETURN); o.has_src1 = 1; o.src1 = 5'd31;
          void'(issue(o));
          if (depth > 0) depth--;
        end else if (r < 18) begin
          o = mk(OP_LVM_SAVE);
          void'(issue(o));
          o = mk(OP_LVM_LOAD); o.lvm_data = $urandom | callee_mask;
          void'(issue(o));
        end else if (r < 20) begin
          o = mk(OP_KILL); o.kill_hi = 1'($urandom_range(0, 1)); o.kill_mask = 16'($urandom & $urandom);
          void'(issue(o));
        end else begin
          o = mk(OP_NORMAL);
          o.has_dst  = (ph == 1) ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 3) != 0);
          o.dst      = areg_t'($urandom_range(1, 31));
          o.has_src1 = 1; o.src1 = areg_t'($urandom_range(0, 31));
          o.has_src2 = 1'($urandom_range(0, 1)); o.src2 = areg_t'($urandom_range(0, 31));
          void'(issue(o));
        end
        while (prog.size() >= W) cycle();
        if ($urandom_range(0, 999) == 0) begin do_flush(); depth = 0; end
      end
    end
    run_all();
    idle_cycles(200);
    check("drained", 64'(rob_count), 64'(0));
    begin
      int nb;
      nb = $countones(map_valid);
      // every bound register owns one physical register; the rest are free
      check("no physical register lost", 64'(free_count), 64'(PHYS - nb));
    end

    $display("kills %0d implicit-kill calls/returns %0d early-release kills %0d",
             n_kill, n_idvi, n_early);
    $display("saves dropped %0d kept %0d, restores dropped %0d kept %0d",
             n_elim_save, n_keep_save, n_elim_restore, n_keep_restore);
    $display("stack overflow %0d underflow %0d, free-list stalls %0d, rob-full stalls %0d",
             n_ovf, n_udf, n_fl_stall, n_rob_stall);
    $display("lvm-save %0d lvm-load %0d flushes %0d value reads %0d commits %0d",
             n_lvm_save, n_lvm_load, n_flush, n_reads, n_commit);
    $display("cycles %0d, multi-operation groups %0d, groups cut at call/return %0d, multi-commit cycles %0d",
             n_cycles, n_multi, n_cut, n_multi_commit);
    if (n_kill == 0)         begin failures++; $display("no kill");            end
    if (n_idvi == 0)         begin failures++; $display("no implicit DVI");    end
    if (n_early == 0)        begin failures++; $display("no early release");   end
    if (n_elim_save == 0)    begin failures++; $display("no save dropped");    end
    if (n_elim_restore == 0) begin failures++; $display("no restore dropped"); end
    if (n_ovf == 0)          begin failures++; $display("no stack overflow");  end
    if (n_udf == 0)          begin failures++; $display("no stack underflow"); end
    if (n_fl_stall == 0)     begin failures++; $display("no free-list stall"); end
    if (n_rob_stall == 0)    begin failures++; $display("no rob-full stall");  end
    if (n_lvm_save == 0 || n_lvm_load == 0) begin failures++; $display("no lvm save/load"); end
    if (n_flush == 0)        begin failures++; $display("no flush");           end
    if (n_multi == 0 || n_cut == 0 || n_multi_commit == 0) begin
      failures++; $display("no multi-operation group, group cut or multi-commit");
    end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
