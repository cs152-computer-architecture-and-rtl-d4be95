// tb_control: self-checking test of the control unit.
// For each of addu, subu, ori, lw, sw and beq, with random funct bits (for the
// I-format instructions) and both values of Equal, the eight control signals are
// compared with a table written out per instruction from the register transfers:
//            nPC_sel RegWr RegDst ExtOp ALUSrc ALUctr MemWr MemtoReg
//   addu        0      1     rd   sign  busB   add     0      0
//   subu        0      1     rd   sign  busB   sub     0      0
//   ori         0      1     rt   zero  imm    or      0      0
//   lw          0      1     rt   sign  imm    add     0      1
//   sw          0      0     rd   sign  imm    add     1      0
//   beq       Equal    0     rd   sign  busB   sub     0      0
module tb_control;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  opcode_t op;
  funct_t  funct;
  logic    equal;
  ctrl_t   ctrl, expv;

  control dut (.op(op), .funct(funct), .equal(equal), .ctrl(ctrl));

  function automatic ctrl_t row(logic n, logic rw, logic rd, ext_op_t e, logic src,
                                alu_ctr_t a, logic mw, logic m2r);
    ctrl_t c;
    c.npc_sel = n; c.reg_wr = rw; c.reg_dst = rd; c.ext_op = e; c.alu_src = src;
    c.alu_ctr = a; c.mem_wr = mw; c.mem_to_reg = m2r;
    return c;
  endfunction

  task automatic apply(string name, opcode_t o, funct_t f, logic eq, ctrl_t e);
    op = o; funct = f; equal = eq;
    #1;
    checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s eq=%0d got %b exp %b", name, eq, ctrl, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) begin
      for (int eq = 0; eq < 2; eq++) begin
        apply("addu", 6'b000000, 6'b100001, 1'(eq), row(0, 1, 1, EXT_SIGN, 0, ALU_ADD, 0, 0));
        apply("subu", 6'b000000, 6'b100011, 1'(eq), row(0, 1, 1, EXT_SIGN, 0, ALU_SUB, 0, 0));
        apply("ori",  6'b001101, 6'($urandom), 1'(eq), row(0, 1, 0, EXT_ZERO, 1, ALU_OR,  0, 0));
        apply("lw",   6'b100011, 6'($urandom), 1'(eq), row(0, 1, 0, EXT_SIGN, 1, ALU_ADD, 0, 1));
        apply("sw",   6'b101011, 6'($urandom), 1'(eq), row(0, 0, 1, EXT_SIGN, 1, ALU_ADD, 1, 0));
        apply("beq",  6'b000100, 6'($urandom), 1'(eq), row(1'(eq), 0, 1, EXT_SIGN, 0, ALU_SUB, 0, 0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
