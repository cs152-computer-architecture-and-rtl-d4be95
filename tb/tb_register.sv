// tb_register: self-checking test of the register with write enable.
// Random data and write enables over many clocks; after each rising edge the output
// must hold the last value written (or the reset value after reset), and it must not
// change between edges.
module tb_register;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, we;
  logic [31:0] d, q, model;

  register #(.N(32), .RESET_VALUE(32'h1234_5678)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    model = 32'h1234_5678;
    checks++; if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); d = $urandom;
      #2;
      checks++; if (q !== model) begin failures++; $display("FAIL q changed before edge"); end
      @(posedge clk); #1;
      if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d we=%0d q=%h exp %h", i, we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
