// tb_adder: self-checking test of the 32-bit adder.
// Applies corner cases (zero, all ones, carry propagation) and random operands with
// and without carry in, and compares {carry, sum} with a 64-bit reference sum.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, sum;
  logic        cin, carry;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry(carry));

  task automatic check_one(logic [31:0] ta, logic [31:0] tb_, logic tc);
    longint unsigned ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = longint'(ta) + longint'(tb_) + longint'(tc);
    checks++;
    if ({carry, sum} !== ref_sum[32:0]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %0d_%h exp %h", ta, tb_, tc, carry, sum, ref_sum[32:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0, 32'h0, 1'b0);
    check_one(32'hffff_ffff, 32'h1, 1'b0);
    check_one(32'hffff_ffff, 32'h0, 1'b1);
    check_one(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check_one(32'h7fff_ffff, 32'h1, 1'b0);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
