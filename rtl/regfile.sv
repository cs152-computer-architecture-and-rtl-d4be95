// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// RA selects the register driven onto busA and RB the one on busB; reads are
// combinational, so the buses follow the addresses after the access time. When Write
// Enable is 1, the register selected by RW takes busW on the rising clock edge; the
// clock matters only for writes. A read of the register being written sees the old
// value until that edge. With ZERO_REG = 1, register 0 always reads as zero and
// ignores writes, as in MIPS. The port set and sizes follow the datapath's register
// file; the zero register and the absence of a reset are this design's choices.
module regfile #(
  parameter int unsigned NREGS    = 32,
  parameter int unsigned WIDTH    = 32,
  parameter bit          ZERO_REG = 1'b1,
  localparam int unsigned AW      = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] bus_w,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && !(ZERO_REG && rw == '0)) regs[rw] <= bus_w;
  end

  always_comb begin
    bus_a = (ZERO_REG && ra == '0) ? '0 : regs[ra];
    bus_b = (ZERO_REG && rb == '0) ? '0 : regs[rb];
  end

endmodule
