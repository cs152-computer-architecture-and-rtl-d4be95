// datapath: the single-cycle MIPS-lite datapath.
//
// The rs, rt, rd and imm16 fields of the instruction are wired straight in. The
// register file reads rs onto busA and rt onto busB. The extender widens imm16
// (ExtOp), the ALUSrc mux feeds busB (0) or the immediate (1) to the ALU's B input,
// and the ALU applies ALUctr and reports Equal. The ALU result addresses the ideal
// data memory, which takes busB as Data In when MemWr is 1. The MemtoReg mux returns
// the ALU result (0) or the memory word (1) on busW, written to rt (RegDst 0) or rd
// (RegDst 1) when RegWr is 1. The fetch unit advances the PC under nPC_sel.
// Everything settles within one clock cycle; the register file, the data memory and
// the PC all update on the same rising edge. The write ports are also brought out so
// that the instruction stream can be observed. The structure and mux numbering follow
// the combined single-cycle datapath; the data memory size is this design's choice.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned DMEM_ADDR_BITS = 10,
  parameter logic [31:0] RESET_PC       = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  instr_t      instr,
  input  ctrl_t       ctrl,
  output logic        equal,
  output logic [31:0] pc,
  // write ports, for observation
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm32, alu_b, alu_result, mem_dout;

  mux2 #(.WIDTH(5)) u_regdst (
    .a(instr.rt), .b(instr.rd), .sel(ctrl.reg_dst), .y(rw)
  );

  regfile u_regfile (
    .clk  (clk),
    .we   (ctrl.reg_wr),
    .ra   (instr.rs),
    .rb   (instr.rt),
    .rw   (rw),
    .bus_w(bus_w),
    .bus_a(bus_a),
    .bus_b(bus_b)
  );

  extender u_ext (
    .imm16(imm16_of(instr)), .ext_op(ctrl.ext_op), .imm32(imm32)
  );

  mux2 #(.WIDTH(32)) u_alusrc (
    .a(bus_b), .b(imm32), .sel(ctrl.alu_src), .y(alu_b)
  );

  alu u_alu (
    .a(bus_a), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_result), .equal(equal)
  );

  ideal_memory #(.ADDR_BITS(DMEM_ADDR_BITS)) u_dmem (
    .clk (clk),
    .we  (ctrl.mem_wr),
    .addr(alu_result),
    .din (bus_b),
    .dout(mem_dout)
  );

  mux2 #(.WIDTH(32)) u_memtoreg (
    .a(alu_result), .b(mem_dout), .sel(ctrl.mem_to_reg), .y(bus_w)
  );

  ifetch #(.RESET_PC(RESET_PC)) u_ifetch (
    .clk(clk), .rst(rst), .npc_sel(ctrl.npc_sel), .imm16(imm16_of(instr)), .pc(pc)
  );

  assign reg_we    = ctrl.reg_wr;
  assign reg_waddr = rw;
  assign reg_wdata = bus_w;
  assign mem_we    = ctrl.mem_wr;
  assign mem_addr  = alu_result;
  assign mem_wdata = bus_b;

endmodule
