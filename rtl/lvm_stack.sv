// lvm_stack: the LVM-Stack, a small circular buffer of Live Value Mask
// snapshots.
//
// At a procedure call the current LVM is pushed; at the return the top entry
// is popped and handed back to the LVM. Restores inside the procedure are
// judged by the top entry, which stays as it was at procedure entry even while
// the live LVM changes. Following the document the buffer wraps around on
// overflow (the oldest snapshot is overwritten) and behaves as empty on
// underflow; this design reads an empty stack as all-live, which never drops
// a restore that might be needed. A flush empties it (used on exceptions and
// other breaks of call/return nesting, where all registers are assumed live).
//
// Interface: push/push_data and pop act at the clock edge; top is the current
// top-of-stack snapshot, valid combinationally. push and pop are not asserted
// together. overflow/underflow flag, in the cycle of the push or pop, that a
// snapshot was lost or that the stack was empty.
module lvm_stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             overflow,
  output logic             underflow
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam logic [CW-1:0] FULL = CW'(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    tos;          // index of the top entry
  logic [$clog2(DEPTH+1)-1:0] cnt;

  function automatic logic [PW-1:0] wrap_inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] wrap_dec(logic [PW-1:0] p);
    return (p == '0) ? PW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign empty     = (cnt == '0);
  assign count     = cnt;
  assign top       = empty ? '1 : mem[tos];
  assign overflow  = push && (cnt == FULL);
  assign underflow = pop && empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos <= '0;
      cnt <= '0;
    end else if (flush) begin
      tos <= '0;
      cnt <= '0;
    end else if (push) begin
      tos      <= wrap_inc(tos);
      mem[wrap_inc(tos)] <= push_data;
      if (cnt != FULL) cnt <= cnt + 1'b1;
    end else if (pop && !empty) begin
      tos <= wrap_dec(tos);
      cnt <= cnt - 1'b1;
    end
  end

  always_comb assert (!(push && pop) || !rst_n) else $error("lvm_stack: push and pop together");

endmodule
