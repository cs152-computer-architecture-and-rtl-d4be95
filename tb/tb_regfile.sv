// tb_regfile: self-checking test of the 32 x 32 register file.
// All registers are first written through the write port, then random reads and
// writes run against a reference array. It checks: reads are combinational, a write
// takes effect only at the rising edge and only with write enable, register 0 reads
// zero whatever is written to it.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];

  regfile dut (.clk(clk), .we(we), .ra(ra), .rb(rb), .rw(rw), .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int k = 0; k < 4; k++) begin
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks++;
      if (bus_a !== model[ra] || bus_b !== model[rb]) begin
        failures++;
        $display("FAIL ra=%0d a=%h exp %h rb=%0d b=%h exp %h", ra, bus_a, model[ra], rb, bus_b, model[rb]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; rw = 0; bus_w = 0;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; rw = 5'(r); bus_w = $urandom;
      model[r] = (r == 0) ? 32'h0 : bus_w;
    end
    @(negedge clk); we = 0;
    check_reads();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); bus_w = $urandom;
      // before the edge the old value must still be visible
      ra = rw; #1;
      checks++;
      if (bus_a !== model[rw]) begin failures++; $display("FAIL write visible before edge r%0d", rw); end
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = bus_w;
      check_reads();
      ra = rw; #1;
      checks++;
      if (bus_a !== model[rw]) begin failures++; $display("FAIL after write r%0d a=%h exp %h", rw, bus_a, model[rw]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
