// free_list: the pool of free physical registers, kept as one bit per
// register.
//
// A bit vector rather than a FIFO is used because dead-value information can
// free many registers at once: when a kill instruction commits, every
// physical register that held one of its dead values returns to the pool in
// the same cycle. For a rename group of up to W operations the pool offers
// its W lowest-numbered free registers (alloc_tag[0] is the lowest); the
// renamer takes the first alloc_cnt of them. After reset the first NUM_ARCH
// physical registers hold the initial architectural values and the rest are
// free. recover replaces the whole vector (after a flush, when the free set is
// recomputed from the committed map).
//
// Timing: alloc_tag/alloc_ok are combinational from the state; alloc_cnt,
// release_mask and recover take effect at the clock edge; recover has
// priority.
module free_list #(
  parameter int unsigned PHYS     = 50,
  parameter int unsigned NUM_ARCH = 32,
  parameter int unsigned W        = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [$clog2(PHYS)-1:0]   alloc_tag [W],
  output logic                      alloc_ok  [W],  // at least k+1 registers free
  input  logic [$clog2(W+1)-1:0]    alloc_cnt,      // tags taken this cycle
  input  logic [PHYS-1:0]           release_mask,   // registers returned
  input  logic                      recover,
  input  logic [PHYS-1:0]           recover_vec,
  output logic [PHYS-1:0]           free_vec,
  output logic [$clog2(PHYS+1)-1:0] free_count
);

  localparam int unsigned TW = $clog2(PHYS);

  logic [PHYS-1:0] fv, taken;

  // The W lowest free registers, in increasing order.
  always_comb begin
    logic [PHYS-1:0] rem;
    rem = fv;
    for (int k = 0; k < W; k++) begin
      alloc_tag[k] = '0;
      for (int i = PHYS - 1; i >= 0; i--)
        if (rem[i]) alloc_tag[k] = TW'(i);
      alloc_ok[k] = |rem;
      if (alloc_ok[k]) rem[alloc_tag[k]] = 1'b0;
    end
  end

  always_comb begin
    taken = '0;
    for (int k = 0; k < W; k++)
      if (k < int'(alloc_cnt) && alloc_ok[k]) taken[alloc_tag[k]] = 1'b1;
    free_count = '0;
    for (int i = 0; i < PHYS; i++)
      free_count = free_count + {{($bits(free_count)-1){1'b0}}, fv[i]};
  end

  assign free_vec = fv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PHYS; i++) fv[i] <= (i >= NUM_ARCH);
    end else if (recover) begin
      fv <= recover_vec;
    end else begin
      fv <= (fv & ~taken) | release_mask;
    end
  end

  // A register may only be returned while it is in use.
  always_ff @(posedge clk)
    if (!recover)
      assert ((release_mask & fv) == '0) else $error("free_list: double free %h", release_mask & fv);

endmodule
