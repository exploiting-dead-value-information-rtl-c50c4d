// tb_dvi_decode: self-checking test of the DVI extraction logic.
// Random operations of every kind with random kill fields and ABI masks; the
// expected kill vector is built bit by bit here, independently of the
// package helper the block uses.
module tb_dvi_decode;
  import dvi_pkg::*;

  dvi_op_t  op;
  regmask_t abi_mask, kill_vec, exp_kill;
  logic     push, pop;
  int       checks = 0, failures = 0;

  dvi_decode dut (.op, .abi_mask, .kill_vec, .push, .pop);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      op       = dvi_op_t'({$urandom, $urandom, $urandom});
      op.kind  = op_kind_e'(n % 8);
      abi_mask = $urandom;
      #1;
      exp_kill = '0;
      for (int i = 1; i < 32; i++) begin
        if (op.kind == OP_KILL)
          exp_kill[i] = (op.kill_hi == (i >= 16)) && op.kill_mask[i % 16];
        else if (op.kind == OP_CALL || op.kind == OP_RETURN)
          exp_kill[i] = abi_mask[i];
      end
      checks++;
      if (kill_vec !== exp_kill) begin
        failures++;
        $display("kind %0d: kill %h expected %h", op.kind, kill_vec, exp_kill);
      end
      checks++;
      if (push !== (op.kind == OP_CALL) || pop !== (op.kind == OP_RETURN)) begin
        failures++;
        $display("kind %0d: push %b pop %b", op.kind, push, pop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
