// dvi_decode: extracts the dead-value information an operation carries.
//
// Explicit DVI: a kill instruction names the dead registers with a mask over
// one half of the register file (see dvi_pkg for the field layout). Implicit
// DVI: a call or a return kills every register set in the ABI mask, which
// software loads with the caller-saved set of the calling convention; a clear
// ABI mask turns implicit DVI off (useful for debugging). The block also flags
// the LVM-Stack actions: push at a call, pop at a return.
//
// Purely combinational; the outputs are valid in the same cycle as the input.
// Following the document: kill mask in non-opcode bits, I-DVI from calls and
// returns through a software-supplied mask. Own choice: the field layout and
// that register r0 (hard-wired zero) is never reported dead.
module dvi_decode
  import dvi_pkg::*;
(
  input  dvi_op_t  op,
  input  regmask_t abi_mask,   // caller-saved registers (I-DVI set)
  output regmask_t kill_vec,   // registers whose values die at this operation
  output logic     push,       // snapshot the LVM onto the LVM-Stack
  output logic     pop         // restore the LVM from the LVM-Stack
);

  regmask_t raw;

  always_comb begin
    unique case (op.kind)
      OP_KILL:             raw = edvi_expand(op.kill_hi, op.kill_mask);
      OP_CALL, OP_RETURN:  raw = abi_mask;
      default:             raw = '0;
    endcase
    kill_vec    = raw;
    kill_vec[0] = 1'b0;
    push        = (op.kind == OP_CALL);
    pop         = (op.kind == OP_RETURN);
  end

endmodule
