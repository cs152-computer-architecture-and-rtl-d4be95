// tb_extender: self-checking test of the immediate extender.
// Every 16-bit immediate is extended both ways; zero extension must give 16 zeros on
// top, sign extension 16 copies of bit 15.
module tb_extender;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] imm16;
  ext_op_t     op;
  logic [31:0] imm32, expv;

  extender dut (.imm16(imm16), .ext_op(op), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int s = 0; s < 2; s++) begin
        imm16 = 16'(v);
        op    = (s == 0) ? EXT_ZERO : EXT_SIGN;
        #1;
        expv = (s == 0) ? 32'(unsigned'(imm16)) : 32'(signed'(imm16));
        checks++;
        if (imm32 !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h op=%0d got %h exp %h", imm16, s, imm32, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
