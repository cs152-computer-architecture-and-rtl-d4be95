// mux2: WIDTH-bit two-input multiplexer.
//
// y follows a when sel is 0 and b when sel is 1. Purely combinational. It is the
// MUX building block of the datapath (RegDst, ALUSrc, MemtoReg and next-PC selection);
// the input numbering matches the 0/1 labels of the combined datapath.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = sel ? b : a;
  end

endmodule
