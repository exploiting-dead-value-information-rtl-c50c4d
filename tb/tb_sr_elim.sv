// tb_sr_elim: self-checking test of the save/restore elimination decision,
// for both the LVM-Stack scheme (saves and restores) and the LVM scheme
// (saves only). The expected decision follows the rule directly: a
// live-store is dropped when its data register is dead in the LVM, a
// live-load when its register is dead in the LVM-Stack top.
module tb_sr_elim;
  import dvi_pkg::*;

  dvi_op_t  op;
  regmask_t lvm, stack_top;
  logic     es1, er1, e1, es0, er0, e0;
  int       checks = 0, failures = 0;
  int       n_save = 0, n_restore = 0;

  sr_elim #(.RESTORE_ELIM(1'b1)) dut_stack (.op, .lvm, .stack_top,
    .elim_save (es1), .elim_restore (er1), .eliminate (e1));
  sr_elim #(.RESTORE_ELIM(1'b0)) dut_lvm (.op, .lvm, .stack_top,
    .elim_save (es0), .elim_restore (er0), .eliminate (e0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_s, exp_r;
    for (int n = 0; n < 4000; n++) begin
      op        = dvi_op_t'({$urandom, $urandom, $urandom});
      op.kind   = op_kind_e'($urandom_range(0, 7));
      lvm       = $urandom;
      stack_top = $urandom;
      #1;
      exp_s = (op.kind == OP_LIVE_STORE) && (((lvm >> op.src1) & 1) == 0);
      exp_r = (op.kind == OP_LIVE_LOAD) && (((stack_top >> op.dst) & 1) == 0);
      if (exp_s) n_save++;
      if (exp_r) n_restore++;
      checks++;
      if (es1 !== exp_s || er1 !== exp_r || e1 !== (exp_s || exp_r)) begin
        failures++;
        $display("stack scheme: kind %0d got %b%b%b", op.kind, es1, er1, e1);
      end
      checks++;
      if (es0 !== exp_s || er0 !== 1'b0 || e0 !== exp_s) begin
        failures++;
        $display("lvm scheme: kind %0d got %b%b%b", op.kind, es0, er0, e0);
      end
    end
    checks++;
    if (n_save == 0 || n_restore == 0) begin
      failures++;
      $display("no save or no restore elimination exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
