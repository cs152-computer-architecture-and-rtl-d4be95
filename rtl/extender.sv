// extender: widens the 16-bit immediate to 32 bits.
//
// ExtOp = zero puts 16 zeros above the immediate (used by ori); ExtOp = sign copies
// bit 15 into the upper half (used by lw, sw and as the ALU operand of other I-format
// instructions). Combinational. Both modes follow the datapath description.
module extender
  import mips_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_t     ext_op,
  output logic [31:0] imm32
);

  always_comb begin
    unique case (ext_op)
      EXT_SIGN: imm32 = {{16{imm16[15]}}, imm16};
      default:  imm32 = {16'h0000, imm16};
    endcase
  end

endmodule
