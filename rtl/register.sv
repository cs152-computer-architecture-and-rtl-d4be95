// register: N-bit register with write enable.
//
// On the rising clock edge, Data Out takes Data In when Write Enable is 1 and keeps its
// value when it is 0. A synchronous reset loads RESET_VALUE. Data Out is valid one
// clock-to-Q after the edge. The write-enable behaviour follows the register building
// block of the datapath; the reset is this design's addition.
module register #(
  parameter int unsigned    N           = 32,
  parameter logic [N-1:0]   RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
