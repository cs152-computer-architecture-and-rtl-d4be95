// ideal_memory: idealized word memory with one address, Data In and Data Out.
//
// Reading is combinational: Data Out shows the word at Address after the access time,
// with no clock involved. When Write Enable is 1, the word at Address takes Data In on
// the rising clock edge. Addresses are byte addresses; the word is selected by
// addr[ADDR_BITS+1:2], so the two low bits and every bit above the array are ignored.
// Contents are not reset. The interface and the read/write behaviour follow the
// idealized memory of the datapath; the size (2**ADDR_BITS words) and the address
// decoding are this design's choice. Used both as instruction and as data memory.
module ideal_memory #(
  parameter int unsigned ADDR_BITS = 10,
  parameter int unsigned WIDTH     = 32
) (
  input  logic             clk,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned DEPTH = 1 << ADDR_BITS;

  logic [WIDTH-1:0]     mem [DEPTH];
  logic [ADDR_BITS-1:0] word;

  assign word = addr[ADDR_BITS+1:2];
  assign dout = mem[word];

  always_ff @(posedge clk) begin
    if (we) mem[word] <= din;
  end

endmodule
