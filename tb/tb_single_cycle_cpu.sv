// tb_single_cycle_cpu: end-to-end test of the MIPS-lite single-cycle processor, with
// every parameter at its default.
// A program is generated, loaded through the program port while reset is held, and
// run. An instruction-level reference model executes the same program and predicts,
// cycle by cycle, the PC, the instruction word and the register-file and
// data-memory writes; every cycle must match, which also checks that each instruction
// takes exactly one clock (CPI = 1). The program:
//   - loads registers 1..29 with ori, sets r31 = 0x200 (data base) and r28 = 1,
//   - fills 32 data words around the base with sw,
//   - runs a counted loop (subu, beq not taken, backward beq taken) LOOPS times,
//   - runs a random body of addu, subu, ori, lw, sw and forward beq, some with
//     equal registers (taken), some with unequal ones (usually not taken),
//   - ends in a one-instruction loop (beq r0, r0, -1), where the run stops.
// Counted and required at least once each: addu, subu, ori, lw, sw, beq taken, beq
// not taken, a backward branch, a negative load/store offset, a write to register 0
// that is discarded.
module tb_single_cycle_cpu;
  import mips_pkg::*;
  localparam int BODY  = 700;
  localparam int LOOPS = 5;

  int checks = 0, failures = 0;
  logic        clk = 0, rst, prog_we;
  logic [31:0] prog_addr, prog_data;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic        reg_we, mem_we;
  logic [4:0]  reg_waddr;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .pc(pc), .instr(instr), .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  instr_t      prog [$];
  logic [31:0] R [32];
  logic [31:0] M [int];
  logic [31:0] mpc;
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_taken, n_not_taken, n_backward, n_negoff, n_r0;

  function automatic instr_t mk_r(funct_t f, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, f};
  endfunction
  function automatic instr_t mk_i(opcode_t o, int rt, int rs, logic [15:0] imm);
    return {o, 5'(rs), 5'(rt), imm};
  endfunction

  task automatic build_program();
    int op, rd, rs, rt, loop_top;
    prog.delete();
    for (int r = 1; r < 30; r++) prog.push_back(mk_i(OP_ORI, r, 0, 16'($urandom)));
    prog.push_back(mk_i(OP_ORI, 31, 0, 16'h0200));
    prog.push_back(mk_i(OP_ORI, 28, 0, 16'h0001));
    for (int w = -16; w < 16; w++) prog.push_back(mk_i(OP_SW, 1 + (w & 15), 31, 16'(w * 4)));
    // counted loop on r30: r30 = LOOPS; top: r30 -= 1; addu r29 += r28; beq r30,r0,+1; beq r0,r0,top
    prog.push_back(mk_i(OP_ORI, 30, 0, 16'(LOOPS)));
    loop_top = prog.size();
    prog.push_back(mk_r(FUNCT_SUBU, 30, 30, 28));
    prog.push_back(mk_r(FUNCT_ADDU, 29, 29, 28));
    prog.push_back(mk_i(OP_BEQ, 0, 30, 16'd1));
    prog.push_back(mk_i(OP_BEQ, 0, 0, 16'(loop_top - (prog.size() + 1))));
    // random body; registers 28, 30 and 31 are never destinations
    for (int n = 0; n < BODY; n++) begin
      op = $urandom_range(0, 5);
      rs = $urandom_range(0, 29); rt = $urandom_range(0, 29); rd = $urandom_range(0, 29);
      if (rt == 28) rt = 0;
      if (rd == 28) rd = 0;
      case (op)
        0: prog.push_back(mk_r(FUNCT_ADDU, rd, rs, rt));
        1: prog.push_back(mk_r(FUNCT_SUBU, rd, rs, rt));
        2: prog.push_back(mk_i(OP_ORI, rt, rs, 16'($urandom)));
        3: prog.push_back(mk_i(OP_LW, rt, 31, 16'($urandom_range(0, 31) * 4 - 64)));
        4: prog.push_back(mk_i(OP_SW, rt, 31, 16'($urandom_range(0, 31) * 4 - 64)));
        default: prog.push_back(mk_i(OP_BEQ, ($urandom_range(0, 2) == 0) ? rs : rt, rs,
                                     16'($urandom_range(0, 3))));
      endcase
    end
    prog.push_back(mk_i(OP_BEQ, 0, 0, 16'hffff));   // halt: branch to itself
  endtask

  // Execute one instruction in the model and compare with this cycle's outputs.
  task automatic check_cycle();
    instr_t      i;
    logic [31:0] a, b, sx, ea, wv, npc;
    logic        rwe, mwe, eq;
    int          dst;
    i   = (mpc[31:2] < 30'(prog.size())) ? prog[mpc[31:2]] : '0;
    a   = (i.rs == 0) ? 32'h0 : R[i.rs];
    b   = (i.rt == 0) ? 32'h0 : R[i.rt];
    sx  = {{16{i.rd[4]}}, imm16_of(i)};
    eq  = (a == b);
    rwe = 0; mwe = 0; dst = 0; wv = 0; ea = 0;
    npc = mpc + 4;
    case (i.op)
      OP_RTYPE: begin rwe = 1; dst = i.rd;
                  if (i.funct == FUNCT_SUBU) begin wv = a - b; n_subu++; end
                  else begin wv = a + b; n_addu++; end
                end
      OP_ORI:   begin rwe = 1; dst = i.rt; wv = a | {16'h0, imm16_of(i)}; n_ori++; end
      OP_LW:    begin rwe = 1; dst = i.rt; ea = a + sx; wv = M[int'(ea)]; n_lw++;
                  if (sx[31]) n_negoff++;
                end
      OP_SW:    begin mwe = 1; ea = a + sx; n_sw++; if (sx[31]) n_negoff++; end
      OP_BEQ:   begin
                  if (eq) begin
                    npc = mpc + 4 + {sx[29:0], 2'b00};
                    n_taken++;
                    if (sx[31]) n_backward++;
                  end else n_not_taken++;
                end
      default:  ;
    endcase
    if (rwe && dst == 0) n_r0++;
    checks++;
    if (pc !== mpc || instr !== 32'(i)) begin
      failures++;
      $display("FAIL pc=%h instr=%h exp pc=%h instr=%h", pc, instr, mpc, i);
    end
    checks++;
    if (reg_we !== rwe || (rwe && (reg_waddr !== 5'(dst) || reg_wdata !== wv))) begin
      failures++;
      $display("FAIL pc=%h reg write %0d r%0d=%h exp %0d r%0d=%h", mpc, reg_we, reg_waddr, reg_wdata, rwe, dst, wv);
    end
    checks++;
    if (mem_we !== mwe || (mwe && (mem_addr !== ea || mem_wdata !== b))) begin
      failures++;
      $display("FAIL pc=%h mem write %0d [%h]=%h exp %0d [%h]=%h", mpc, mem_we, mem_addr, mem_wdata, mwe, ea, b);
    end
    if (rwe && dst != 0) R[dst] = wv;
    if (mwe) M[int'(ea)] = b;
    mpc = npc;
  endtask

  task automatic require(string what, int n);
    $display("  %-28s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int halt_pc, cycles;
    build_program();
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    foreach (prog[k]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(k) << 2; prog_data = prog[k];
    end
    @(negedge clk);
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    R[0] = 0; mpc = 32'h0;
    halt_pc = (prog.size() - 1) * 4;
    cycles = 0;
    while (!(mpc == 32'(halt_pc) && cycles > 0 && pc == 32'(halt_pc))) begin
      #1;
      check_cycle();
      cycles++;
      @(negedge clk);
    end
    // two more cycles in the halt loop: PC must stay put
    repeat (2) begin #1; check_cycle(); @(negedge clk); end
    $display("ran %0d instructions in %0d cycles", cycles, cycles);
    require("addu", n_addu);
    require("subu", n_subu);
    require("ori", n_ori);
    require("lw", n_lw);
    require("sw", n_sw);
    require("beq taken", n_taken);
    require("beq not taken", n_not_taken);
    require("backward branch", n_backward);
    require("negative lw/sw offset", n_negoff);
    require("discarded write to r0", n_r0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
