// tb_ideal_memory: self-checking test of the idealized memory.
// Fills the memory (small size) through the write port, then mixes random reads and
// writes against a reference array: reads are combinational and see the new word only
// after the rising edge; the two low address bits and the bits above the array are
// ignored.
module tb_ideal_memory;
  localparam int AB = 6;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [1 << AB];

  ideal_memory #(.ADDR_BITS(AB)) dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  function automatic int widx(logic [31:0] ad);
    return int'(ad[AB+1:2]);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    for (int w = 0; w < (1 << AB); w++) begin
      @(negedge clk);
      we = 1; addr = 32'(w) << 2; din = $urandom; model[w] = din;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); addr = $urandom; din = $urandom;
      #1;
      checks++;
      if (dout !== model[widx(addr)]) begin failures++; $display("FAIL read before edge addr=%h", addr); end
      @(posedge clk); #1;
      if (we) model[widx(addr)] = din;
      checks++;
      if (dout !== model[widx(addr)]) begin failures++; $display("FAIL read after edge addr=%h got %h exp %h", addr, dout, model[widx(addr)]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
