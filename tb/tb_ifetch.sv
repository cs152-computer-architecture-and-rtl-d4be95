// tb_ifetch: self-checking test of the instruction fetch unit.
// After reset the PC must be the reset address; then each clock, with random nPC_sel
// and offset, the PC must become PC + 4 or PC + 4 + (sign-extended offset * 4), with
// exactly one update per clock. Backward and forward branches are both exercised.
module tb_ifetch;
  int checks = 0, failures = 0, taken = 0;
  logic        clk = 0, rst, npc_sel;
  logic [15:0] imm16;
  logic [31:0] pc, model;

  ifetch #(.RESET_PC(32'h0000_0100)) dut (.clk(clk), .rst(rst), .npc_sel(npc_sel), .imm16(imm16), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; imm16 = 0;
    @(posedge clk); #1;
    model = 32'h100;
    checks++; if (pc !== model) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      npc_sel = 1'($urandom); imm16 = 16'($urandom);
      @(posedge clk); #1;
      model = model + 32'd4 + (npc_sel ? {{14{imm16[15]}}, imm16, 2'b00} : 32'd0);
      taken += npc_sel;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL i=%0d sel=%0d imm=%h pc=%h exp %h", i, npc_sel, imm16, pc, model); end
    end
    if (taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
