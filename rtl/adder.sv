// adder: WIDTH-bit binary adder with carry in and carry out.
//
// Sum = A + B + CarryIn, Carry is the bit that leaves the top. Purely combinational.
// The ports (A, B, CarryIn, Sum, Carry) and the 32-bit width follow the basic building
// block of the single-cycle datapath; it is written as one addition and left to
// synthesis to pick the carry structure.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry
);

  always_comb begin
    {carry, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, carry_in};
  end

endmodule
