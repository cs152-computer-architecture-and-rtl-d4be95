// tb_datapath: self-checking test of the single-cycle datapath, without the control
// unit and the instruction memory.
// The testbench plays both: it makes up an instruction stream, derives the control
// signals from its own table, and drives both into the datapath each clock. A
// reference model of the registers, the data memory and the PC predicts, for every
// cycle, Equal, the PC and the register-file and data-memory writes. The stream first
// loads every register with ori and fills a 32-word data area with sw, then runs random
// addu, subu, ori, lw, sw and beq. lw/sw use register 31 (kept at 0x200) as the base,
// with offsets from -64 to +60, so negative sign-extended offsets occur.
module tb_datapath;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst;
  instr_t      instr;
  ctrl_t       ctrl;
  logic        equal, reg_we, mem_we;
  logic [31:0] pc, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;

  logic [31:0] R [32];
  logic [31:0] M [int];
  logic [31:0] mpc;

  datapath dut (
    .clk(clk), .rst(rst), .instr(instr), .ctrl(ctrl), .equal(equal), .pc(pc),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata)
  );

  always #5 clk = ~clk;

  function automatic instr_t mk_r(funct_t f, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, f};
  endfunction
  function automatic instr_t mk_i(opcode_t o, int rt, int rs, logic [15:0] imm);
    return {o, 5'(rs), 5'(rt), imm};
  endfunction

  // Control table, per instruction.
  function automatic ctrl_t ctrl_of(instr_t i, logic eq);
    ctrl_t c;
    c = '0;
    c.ext_op = EXT_SIGN;
    case (i.op)
      OP_RTYPE: begin c.reg_wr = 1; c.reg_dst = 1; c.alu_ctr = (i.funct == FUNCT_SUBU) ? ALU_SUB : ALU_ADD; end
      OP_ORI:   begin c.reg_wr = 1; c.ext_op = EXT_ZERO; c.alu_src = 1; c.alu_ctr = ALU_OR; end
      OP_LW:    begin c.reg_wr = 1; c.alu_src = 1; c.alu_ctr = ALU_ADD; c.mem_to_reg = 1; end
      OP_SW:    begin c.reg_dst = 1; c.alu_src = 1; c.alu_ctr = ALU_ADD; c.mem_wr = 1; end
      OP_BEQ:   begin c.reg_dst = 1; c.alu_ctr = ALU_SUB; c.npc_sel = eq; end
      default:  ;
    endcase
    return c;
  endfunction

  task automatic step(instr_t i);
    logic [31:0] a, b, sx, zx, ea, wv;
    logic        eq, rwe, mwe;
    int          dst;
    @(negedge clk);
    a  = (i.rs == 0) ? 32'h0 : R[i.rs];
    b  = (i.rt == 0) ? 32'h0 : R[i.rt];
    sx = {{16{i.rd[4]}}, imm16_of(i)};
    zx = {16'h0, imm16_of(i)};
    eq = (a == b);
    instr = i;
    ctrl  = ctrl_of(i, eq);
    rwe = 0; mwe = 0; dst = 0; wv = 0; ea = 0;
    case (i.op)
      OP_RTYPE: begin rwe = 1; dst = i.rd; wv = (i.funct == FUNCT_SUBU) ? a - b : a + b; end
      OP_ORI:   begin rwe = 1; dst = i.rt; wv = a | zx; end
      OP_LW:    begin rwe = 1; dst = i.rt; ea = a + sx; wv = M[int'(ea)]; end
      OP_SW:    begin mwe = 1; ea = a + sx; end
      default:  ;
    endcase
    #1;
    checks++;
    if (pc !== mpc) begin failures++; $display("FAIL pc=%h exp %h", pc, mpc); end
    if (i.op == OP_BEQ) begin
      checks++;
      if (equal !== eq) begin failures++; $display("FAIL equal=%0d exp %0d", equal, eq); end
    end
    checks++;
    if (reg_we !== rwe || (rwe && (reg_waddr !== 5'(dst) || reg_wdata !== wv))) begin
      failures++;
      $display("FAIL reg write %0d r%0d=%h exp %0d r%0d=%h (instr %h)", reg_we, reg_waddr, reg_wdata, rwe, dst, wv, i);
    end
    checks++;
    if (mem_we !== mwe || (mwe && (mem_addr !== ea || mem_wdata !== b))) begin
      failures++;
      $display("FAIL mem write %0d [%h]=%h exp %0d [%h]=%h", mem_we, mem_addr, mem_wdata, mwe, ea, b);
    end
    // commit
    if (rwe && dst != 0) R[dst] = wv;
    if (mwe) M[int'(ea)] = b;
    mpc = mpc + 4 + ((i.op == OP_BEQ && eq) ? {{14{i.rd[4]}}, imm16_of(i), 2'b00} : 32'h0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op, rd, rs, rt;
    logic [15:0] imm;
    rst = 1; instr = '0; ctrl = '0;
    @(posedge clk); #1;
    rst = 0; mpc = 32'h0;
    R[0] = 0;
    for (int r = 1; r < 31; r++) step(mk_i(OP_ORI, r, 0, 16'($urandom)));
    step(mk_i(OP_ORI, 31, 0, 16'h0200));
    for (int w = -16; w < 16; w++) step(mk_i(OP_SW, 1 + (w & 15), 31, 16'(w * 4)));
    for (int n = 0; n < 3000; n++) begin
      op = $urandom_range(0, 5);
      rd = $urandom_range(0, 30); rs = $urandom_range(0, 30); rt = $urandom_range(0, 30);
      imm = 16'($urandom);
      case (op)
        0: step(mk_r(FUNCT_ADDU, rd, rs, rt));
        1: step(mk_r(FUNCT_SUBU, rd, rs, rt));
        2: step(mk_i(OP_ORI, rt, rs, imm));
        3: step(mk_i(OP_LW, rt, 31, 16'($signed($urandom_range(0, 31)) * 4 - 64)));
        4: step(mk_i(OP_SW, rt, 31, 16'($signed($urandom_range(0, 31)) * 4 - 64)));
        default: step(mk_i(OP_BEQ, ($urandom_range(0, 3) == 0) ? rs : rt, rs, imm));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
