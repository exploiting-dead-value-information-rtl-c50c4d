// tb_free_list: self-checking test of the physical register pool at its
// default size (50 registers, 32 bound at reset, 4 offered per cycle). A
// reference bit vector is kept here; random allocations of 0 to 4 registers,
// multi-register releases (as a kill commit produces) and whole-vector
// recoveries are checked against it, including the offered tags (the four
// lowest free registers, in order), a nearly empty and an empty pool.
module tb_free_list;
  localparam int PHYS = 50;

  logic            clk = 0, rst_n = 0, recover = 0;
  logic [5:0]      alloc_tag [4];
  logic            alloc_ok  [4];
  logic [2:0]      alloc_cnt = 0;
  logic [PHYS-1:0] release_mask = '0, recover_vec = '0, free_vec;
  logic [5:0]      free_count;
  int              checks = 0, failures = 0, n_empty = 0, n_multi = 0;

  logic [PHYS-1:0] model;

  free_list dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k-th lowest set bit, or -1
  function automatic int nth(logic [PHYS-1:0] v, int k);
    for (int i = 0; i < PHYS; i++) if (v[i]) begin if (k == 0) return i; k--; end
    return -1;
  endfunction

  initial begin
    for (int i = 0; i < PHYS; i++) model[i] = (i >= 32);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      logic [PHYS-1:0] inuse, rel;
      int cnt;
      @(negedge clk);
      cnt = $countones(model);
      checks++;
      if (free_vec !== model || free_count !== 6'(cnt)) begin
        failures++;
        $display("step %0d: free %h count %0d, expected %h %0d", n, free_vec, free_count, model, cnt);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (alloc_ok[k] !== (cnt > k) || (cnt > k && alloc_tag[k] !== 6'(nth(model, k)))) begin
          failures++;
          $display("step %0d slot %0d: ok %b tag %0d, expected %b %0d", n, k, alloc_ok[k],
                   alloc_tag[k], cnt > k, nth(model, k));
        end
      end
      if (cnt == 0) n_empty++;
      // Random stimulus: in one phase allocation outpaces release, so the
      // pool runs dry now and then.
      alloc_cnt = 3'($urandom_range(0, 4));
      if (int'(alloc_cnt) > cnt) alloc_cnt = 3'(cnt);
      inuse   = ~model;
      rel     = '0;
      if ($urandom_range(0, 99) < (((n / 500) % 2 == 0) ? 3 : 60))
        for (int i = 0; i < PHYS; i++)
          if (inuse[i] && $urandom_range(0, 3) == 0) rel[i] = 1'b1;
      if ($countones(rel) > 1) n_multi++;
      release_mask = rel;
      recover      = ($urandom_range(0, 199) == 0);
      for (int i = 0; i < PHYS; i++) recover_vec[i] = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      if (recover) model = recover_vec;
      else begin
        logic [PHYS-1:0] tk;
        tk = '0;
        for (int k = 0; k < int'(alloc_cnt); k++) tk[nth(model, k)] = 1'b1;
        model = (model & ~tk) | rel;
      end
    end
    checks++;
    if (n_empty == 0 || n_multi == 0) begin
      failures++;
      $display("pool never empty (%0d) or no multi-release (%0d)", n_empty, n_multi);
    end
    $display("empty cycles %0d, multi-register releases %0d", n_empty, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
