// tb_lvm_stack: self-checking test of the LVM-Stack at its default 16
// entries. A reference model keeps every snapshot ever pushed in an unbounded
// list and knows that only the last 16 survive; random push/pop/flush
// sequences deep enough to overflow and to underflow are checked against it.
module tb_lvm_stack;
  localparam int DEPTH = 16;

  logic        clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [31:0] push_data = 0, top;
  logic        empty, overflow, underflow;
  logic [4:0]  count;
  int          checks = 0, failures = 0;
  int          n_ovf = 0, n_udf = 0;

  logic [31:0] model [$];

  lvm_stack dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_top();
    logic [31:0] exp;
    int          exp_cnt;
    exp_cnt = (model.size() > DEPTH) ? DEPTH : model.size();
    exp     = (model.size() == 0) ? 32'hffff_ffff : model[$];
    checks++;
    if (top !== exp || count !== 5'(exp_cnt) || empty !== (exp_cnt == 0)) begin
      failures++;
      $display("top %h count %0d, expected %h %0d", top, count, exp, exp_cnt);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_top();
    for (int n = 0; n < 5000; n++) begin
      int r;
      r = $urandom_range(0, 99);
      // Bias towards pushing in the first half of each 1000-step phase,
      // towards popping in the second, so both overflow and underflow occur.
      push  = ((n / 500) % 2 == 0) ? (r < 65) : (r < 30);
      pop   = !push && (r < 97);
      flush = (r == 99) && (n % 7 == 0);
      if (flush) begin push = 0; pop = 0; end
      push_data = $urandom;
      #1;
      checks++;
      if (overflow !== (push && model.size() >= DEPTH) ||
          underflow !== (pop && model.size() == 0)) begin
        failures++;
        $display("overflow/underflow flags wrong at step %0d", n);
      end
      if (overflow) n_ovf++;
      if (underflow) n_udf++;
      @(posedge clk);
      if (flush) model.delete();
      else if (push) begin
        model.push_back(push_data);
        if (model.size() > DEPTH) void'(model.pop_front());
      end else if (pop && model.size() > 0) void'(model.pop_back());
      @(negedge clk);
      push = 0; pop = 0; flush = 0;
      check_top();
    end
    checks++;
    if (n_ovf == 0 || n_udf == 0) begin
      failures++;
      $display("overflow %0d underflow %0d: not both exercised", n_ovf, n_udf);
    end
    $display("overflows %0d underflows %0d", n_ovf, n_udf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
