// tb_phys_regfile: self-checking test of the 50-entry, 8-read, 4-write
// physical register file. Random writes on all ports (with same-register
// collisions, where the highest port must win) are mirrored in a model
// array, and all eight read ports are compared with it every cycle.
module tb_phys_regfile;
  localparam int PHYS = 50, NR = 8, NW = 4;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  raddr [NR];
  logic [31:0] rdata [NR];
  logic        we    [NW];
  logic [5:0]  waddr [NW];
  logic [31:0] wdata [NW];
  logic [31:0] model [PHYS];
  int          checks = 0, failures = 0, n_coll = 0;

  phys_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < PHYS; i++) model[i] = '0;
    for (int w = 0; w < NW; w++) begin we[w] = 0; waddr[w] = 0; wdata[w] = 0; end
    for (int r = 0; r < NR; r++) raddr[r] = 6'(r);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        raddr[r] = 6'($urandom_range(0, PHYS - 1));
      end
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++;
          $display("step %0d port %0d: p%0d read %h expected %h", n, r, raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      for (int w = 0; w < NW; w++) begin
        we[w]    = $urandom_range(0, 1);
        waddr[w] = 6'($urandom_range(0, (n % 10 == 0) ? 3 : PHYS - 1));
        wdata[w] = $urandom;
      end
      for (int w = 1; w < NW; w++)
        for (int v = 0; v < w; v++)
          if (we[w] && we[v] && waddr[w] == waddr[v]) n_coll++;
      @(posedge clk);
      for (int w = 0; w < NW; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
    checks++;
    if (n_coll == 0) begin
      failures++;
      $display("no write-port collision exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
