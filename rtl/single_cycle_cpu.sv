// single_cycle_cpu: MIPS-lite processor that executes one instruction per clock.
//
// The ideal instruction memory is read at the PC; its word goes to the control unit
// (op, funct) and to the datapath (rs, rt, rd, imm16). The control unit turns op,
// funct and the datapath's Equal condition into the eight control signals, and the
// datapath executes the instruction and updates the PC, the register file and the
// data memory on the next rising clock edge. Instructions: addu, subu, ori, lw, sw,
// beq (branch offset in words, relative to PC + 4).
//
// Interface: clk; rst (synchronous, PC <= RESET_PC); prog_we/prog_addr/prog_data write
// one instruction word into the instruction memory per clock (while prog_we is high
// the instruction memory is addressed by prog_addr, so rst must be held meanwhile;
// an assertion checks this); pc and
// instr show the instruction being executed; reg_* and mem_* show the register-file
// and data-memory writes that take effect at the end of the cycle.
// The split into instruction memory, control and datapath follows the single-cycle
// design; the program-load port, the reset and the memory sizes are this design's.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_BITS = 10,
  parameter int unsigned DMEM_ADDR_BITS = 10,
  parameter logic [31:0] RESET_PC       = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  logic [31:0] imem_addr;
  instr_t      inst;
  ctrl_t       ctrl;
  logic        equal;

  mux2 #(.WIDTH(32)) u_imem_addr (
    .a(pc), .b(prog_addr), .sel(prog_we), .y(imem_addr)
  );

  ideal_memory #(.ADDR_BITS(IMEM_ADDR_BITS)) u_imem (
    .clk (clk),
    .we  (prog_we),
    .addr(imem_addr),
    .din (prog_data),
    .dout(inst)
  );

  control u_control (
    .op(inst.op), .funct(inst.funct), .equal(equal), .ctrl(ctrl)
  );

  datapath #(.DMEM_ADDR_BITS(DMEM_ADDR_BITS), .RESET_PC(RESET_PC)) u_datapath (
    .clk      (clk),
    .rst      (rst),
    .instr    (inst),
    .ctrl     (ctrl),
    .equal    (equal),
    .pc       (pc),
    .reg_we   (reg_we),
    .reg_waddr(reg_waddr),
    .reg_wdata(reg_wdata),
    .mem_we   (mem_we),
    .mem_addr (mem_addr),
    .mem_wdata(mem_wdata)
  );

  assign instr = inst;

  // Loading the instruction memory takes its address away from the PC, so the
  // processor must be held in reset while it happens.
  prog_load_in_reset: assert property (@(posedge clk) prog_we |-> rst)
    else $error("prog_we asserted while the processor is running");

endmodule
