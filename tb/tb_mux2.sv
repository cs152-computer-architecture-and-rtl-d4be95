// tb_mux2: self-checking test of the two-input multiplexer.
// Random data on both inputs with both select values; y must equal a for sel = 0 and
// b for sel = 1.
module tb_mux2;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  logic        sel;

  mux2 #(.WIDTH(32)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom; sel = 1'(i);
      #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%0d a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
