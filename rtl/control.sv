// control: decodes an instruction into the datapath's control signals.
//
// Purely combinational, from op, funct and the Equal condition of the datapath:
//   nPC_sel  = Equal for beq, else 0
//   ALUSrc   = busB for R-format (op 000000) and beq, else the extended immediate
//   ALUctr   = from funct for R-format (subu: sub, otherwise add), or for ori,
//              sub for beq, add otherwise
//   ExtOp    = zero for ori, else sign
//   MemWr    = sw;  MemtoReg = lw
//   RegWr    = 0 for sw and beq, else 1
//   RegDst   = rt (0) for lw and ori, else rd (1)
// These equations are the ones of the single-cycle design, except that beq also
// takes busB so that Equal compares rs with rt as its register transfer requires; the numeric opcodes are
// the standard MIPS values, and the funct-to-ALUctr map is this design's choice.
module control
  import mips_pkg::*;
(
  input  opcode_t op,
  input  funct_t  funct,
  input  logic    equal,
  output ctrl_t   ctrl
);

  logic is_rtype, is_ori, is_lw, is_sw, is_beq;

  assign is_rtype = (op == OP_RTYPE);
  assign is_ori   = (op == OP_ORI);
  assign is_lw    = (op == OP_LW);
  assign is_sw    = (op == OP_SW);
  assign is_beq   = (op == OP_BEQ);

  always_comb begin
    ctrl.npc_sel    = is_beq && equal;
    ctrl.alu_src    = !(is_rtype || is_beq);
    if (is_rtype)    ctrl.alu_ctr = (funct == FUNCT_SUBU) ? ALU_SUB : ALU_ADD;
    else if (is_ori) ctrl.alu_ctr = ALU_OR;
    else if (is_beq) ctrl.alu_ctr = ALU_SUB;
    else             ctrl.alu_ctr = ALU_ADD;
    ctrl.ext_op     = is_ori ? EXT_ZERO : EXT_SIGN;
    ctrl.mem_wr     = is_sw;
    ctrl.mem_to_reg = is_lw;
    ctrl.reg_wr     = !(is_sw || is_beq);
    ctrl.reg_dst    = !(is_lw || is_ori);
  end

endmodule
