// tb_full_adder: exhaustive check of the one-bit full adder against a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> co=%0b s=%0b", a, b, cin, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
