// mips_pkg: types and constants shared by the MIPS-lite single-cycle processor.
//
// Holds the instruction field layout (op 31..26, rs 25..21, rt 20..16, rd 15..11,
// shamt 10..6, funct 5..0, imm16 15..0), the opcode and funct values of the six
// instructions the processor executes (addu, subu, ori, lw, sw, beq), the ALUctr and
// ExtOp encodings and the bundle of control signals that the control unit drives into
// the datapath. The field layout and the signal names follow the MIPS-lite
// description; the numeric opcode and funct values are the standard MIPS ones, and the
// ALUctr encoding is this design's own choice.
package mips_pkg;


  typedef logic [5:0] opcode_t;
  typedef logic [5:0] funct_t;

  localparam opcode_t OP_RTYPE = 6'b000000;
  localparam opcode_t OP_ORI   = 6'b001101;
  localparam opcode_t OP_LW    = 6'b100011;
  localparam opcode_t OP_SW    = 6'b101011;
  localparam opcode_t OP_BEQ   = 6'b000100;

  localparam funct_t FUNCT_ADDU = 6'b100001;
  localparam funct_t FUNCT_SUBU = 6'b100011;

  // Instruction word split into its fields (R format; the I format shares op/rs/rt
  // and keeps its 16-bit immediate in {rd, shamt, funct}).
  typedef struct packed {
    opcode_t    op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    funct_t     funct;
  } instr_t;

  function automatic logic [15:0] imm16_of(instr_t i);
    return {i.rd, i.shamt, i.funct};
  endfunction

  // ALU operations named by ALUctr.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } alu_ctr_t;

  // ExtOp: how the extender widens imm16.
  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_t;

  // The eight control signals of the datapath.
  typedef struct packed {
    logic     npc_sel;    // 0: PC+4, 1: PC+4+SignExt(imm16)||00
    logic     reg_wr;     // write the destination register
    logic     reg_dst;    // 0: rt, 1: rd
    ext_op_t  ext_op;     // zero or sign extension of imm16
    logic     alu_src;    // 0: busB, 1: extended immediate
    alu_ctr_t alu_ctr;    // add, sub, or
    logic     mem_wr;     // write data memory
    logic     mem_to_reg; // 0: ALU result, 1: data memory output to busW
  } ctrl_t;

endpackage
