// tb_alu: self-checking test of the ALU.
// Each of add, sub and or is applied to corner values and random operands; the result
// is compared with the SystemVerilog operator, and equal with result == 0. Equal
// operands under sub must raise equal.
module tb_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, result, expv;
  alu_ctr_t    ctr;
  logic        equal;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .equal(equal));

  task automatic check_one(logic [31:0] ta, logic [31:0] tb_, alu_ctr_t tc);
    a = ta; b = tb_; ctr = tc;
    #1;
    case (tc)
      ALU_ADD: expv = ta + tb_;
      ALU_SUB: expv = ta - tb_;
      default: expv = ta | tb_;
    endcase
    checks++;
    if (result !== expv || equal !== (expv == 32'h0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%0d exp %h", tc.name(), ta, tb_, result, equal, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    check_one(32'h5, 32'h5, ALU_SUB);
    check_one(32'h0, 32'h1, ALU_SUB);
    check_one(32'hffff_ffff, 32'h1, ALU_ADD);
    check_one(32'hf0f0_0000, 32'h0000_1234, ALU_OR);
    check_one(32'h0, 32'h0, ALU_OR);
    for (int i = 0; i < 1000; i++) begin
      r = $urandom;
      check_one(r, r, ALU_SUB);
      check_one($urandom, $urandom, ALU_ADD);
      check_one($urandom, $urandom, ALU_SUB);
      check_one($urandom, $urandom, ALU_OR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
