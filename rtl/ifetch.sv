// ifetch: instruction fetch unit, the PC and its next-address logic.
//
// One adder forms PC + 4; a second adds the branch offset SignExt(imm16) || 00 to
// that sum; a mux under nPC_sel picks PC + 4 (0) or the branch target (1), and the PC
// takes it on every rising clock edge. The PC's two low bits are always 00, so only
// bits 31..2 are stored. pc is the instruction address for the current cycle. A
// synchronous reset loads RESET_PC. The two adders, the offset extension and the mux
// follow the datapath's fetch unit; the reset is this design's addition.
module ifetch #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic [15:0] imm16,
  output logic [31:0] pc
);

  logic [29:0] pc_word;
  logic [31:0] pc_plus4;
  logic [31:0] pc_ext;
  logic [31:0] branch_target;
  logic [31:0] next_pc;
  logic        carry0_unused;
  logic        carry1_unused;

  assign pc     = {pc_word, 2'b00};
  assign pc_ext = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.WIDTH(32)) u_inc (
    .a(pc), .b(32'd4), .carry_in(1'b0), .sum(pc_plus4), .carry(carry0_unused)
  );

  adder #(.WIDTH(32)) u_br (
    .a(pc_plus4), .b(pc_ext), .carry_in(1'b0), .sum(branch_target), .carry(carry1_unused)
  );

  mux2 #(.WIDTH(32)) u_sel (
    .a(pc_plus4), .b(branch_target), .sel(npc_sel), .y(next_pc)
  );

  register #(.N(30), .RESET_VALUE(RESET_PC[31:2])) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(next_pc[31:2]), .q(pc_word)
  );

endmodule
