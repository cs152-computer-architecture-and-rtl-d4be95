// alu: the datapath's arithmetic/logic unit, add, sub and or under ALUctr.
//
// Add and subtract share one adder: for sub, B is inverted and CarryIn is 1, so the
// adder forms A + ~B + 1 = A - B. Or is a bitwise OR. Overflow is ignored (addU/subU).
// equal is high when the result is zero; with ALUctr = sub this is the A == B test that
// beq needs. Combinational. Operations and the Equal output follow the single-cycle
// datapath; sharing the adder and the zero-detect form of Equal are this design's
// choice.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_t         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             equal
);

  logic             subtract;
  logic [WIDTH-1:0] b_eff;
  logic [WIDTH-1:0] sum;
  logic             carry_unused;

  assign subtract = (alu_ctr == ALU_SUB);
  assign b_eff    = subtract ? ~b : b;

  adder #(.WIDTH(WIDTH)) u_adder (
    .a       (a),
    .b       (b_eff),
    .carry_in(subtract),
    .sum     (sum),
    .carry   (carry_unused)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_OR:  result = a | b;
      default: result = sum;
    endcase
  end

  assign equal = (result == '0);

endmodule
